0004ffff0022fffc
0000000000000000
00040001ffdefffc
0064ffde00a5ff9c
fff900000000fff9
00640022ff5bff9c
00c0ff5b00a5ff40
0000000000000000
00c000a5ff5bff40
0064ff5b0022ff9c
fff900000000fff9
006400a5ffdeff9c
0004ffde0001fffc
0000000000000000
00040022fffffffc
