// Initial data memory words at byte addresses 0, 4, 8 and 12.
30303030
20202020
40404040
00000000
