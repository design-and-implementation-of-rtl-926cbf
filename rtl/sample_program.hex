// Seven-instruction test program (word address 0 upward):
// lw t1,0(x0); lw t2,4(x0); bne t2,t1,8; ori t3,x0,4; and t4,t2,x0;
// sw t3,8(x9); jal t1,8
00002303
00402383
00639463
00406e13
0003feb3
01c4a423
0080036f
