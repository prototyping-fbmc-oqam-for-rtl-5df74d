0000
0000
0001
0001
0002
0002
0003
0004
0005
0007
0008
0009
000b
000d
000f
0011
0013
0015
0017
0019
001c
001f
0021
0024
0027
002a
002d
0030
0033
0036
0039
003d
0040
0044
0047
004b
004e
0052
0055
0059
005c
0060
0064
0067
006b
006e
0072
0075
0079
007c
0080
0083
0086
0089
008c
008f
0092
0095
0098
009a
009d
009f
00a1
00a3
00a5
00a7
00a9
00aa
00ab
00ac
00ad
00ae
00ae
00af
00af
00ae
00ae
00ad
00ac
00ab
00aa
00a8
00a6
00a4
00a1
009e
009b
0098
0094
0090
008c
0087
0082
007d
0077
0071
006a
0064
005d
0055
004d
0045
003c
0034
002a
0020
0016
000c
0001
fff5
ffea
ffde
ffd1
ffc4
ffb7
ffa9
ff9b
ff8c
ff7d
ff6e
ff5e
ff4d
ff3d
ff2c
ff1a
ff08
fef6
fee3
fed0
febc
fea8
fe94
fe7f
fe6a
fe54
fe3e
fe27
fe11
fdf9
fde2
fdca
fdb2
fd99
fd80
fd66
fd4d
fd32
fd18
fcfd
fce2
fcc7
fcab
fc8f
fc72
fc56
fc39
fc1c
fbfe
fbe1
fbc3
fba5
fb86
fb68
fb49
fb2a
fb0b
faeb
facc
faac
fa8c
fa6d
fa4d
fa2d
fa0c
f9ec
f9cc
f9ac
f98b
f96b
f94b
f92a
f90a
f8ea
f8c9
f8a9
f889
f869
f84a
f82a
f80b
f7eb
f7cc
f7ad
f78f
f770
f752
f734
f717
f6fa
f6dd
f6c0
f6a4
f688
f66d
f652
f638
f61e
f604
f5eb
f5d3
f5bb
f5a3
f58d
f577
f561
f54c
f538
f524
f512
f500
f4ee
f4de
f4ce
f4bf
f4b1
f4a4
f497
f48c
f481
f478
f46f
f467
f460
f45b
f456
f452
f450
f44e
f44e
f44f
f451
f454
f458
f45e
f464
f46c
f476
f480
f48c
f499
f4a8
f4b8
f4c9
f4dc
f4f0
f505
f51c
f534
f54e
f56a
f586
f5a5
f5c5
f5e6
f609
f62e
f654
f67c
f6a6
f6d1
f6fe
f72c
f75c
f78e
f7c2
f7f7
f82e
f867
f8a1
f8dd
f91b
f95b
f99d
f9e0
fa25
fa6d
fab5
fb00
fb4d
fb9b
fbeb
fc3d
fc91
fce7
fd3f
fd98
fdf4
fe51
feb0
ff11
ff74
ffd9
0040
00a9
0113
0180
01ee
025e
02d1
0345
03ba
0432
04ac
0527
05a5
0624
06a5
0728
07ad
0834
08bc
0947
09d3
0a61
0af0
0b82
0c15
0caa
0d41
0dda
0e74
0f10
0fae
104d
10ee
1191
1235
12db
1383
142c
14d7
1583
1631
16e0
1791
1844
18f8
19ad
1a64
1b1c
1bd6
1c90
1d4d
1e0a
1ec9
1f89
204b
210d
21d1
2296
235c
2423
24eb
25b5
267f
274a
2817
28e4
29b2
2a82
2b51
2c22
2cf4
2dc6
2e99
2f6d
3042
3117
31ed
32c3
339a
3471
3549
3622
36fa
37d4
38ad
3987
3a61
3b3b
3c16
3cf0
3dcb
3ea6
3f81
405c
4137
4212
42ed
43c8
44a2
457d
4657
4731
480a
48e4
49bc
4a95
4b6d
4c44
4d1b
4df2
4ec8
4f9d
5071
5145
5218
52ea
53bc
548c
555c
562b
56f8
57c5
5891
595b
5a24
5aed
5bb4
5c7a
5d3e
5e01
5ec3
5f84
6043
6100
61bc
6277
6330
63e8
649d
6552
6604
66b5
6764
6811
68bc
6966
6a0d
6ab3
6b57
6bf8
6c98
6d36
6dd1
6e6b
6f02
6f97
702a
70bb
7149
71d5
725f
72e7
736c
73ef
746f
74ed
7568
75e1
7658
76cc
773d
77ac
7818
7882
78e8
794d
79ae
7a0d
7a69
7ac3
7b19
7b6d
7bbe
7c0c
7c58
7ca1
7ce6
7d29
7d69
7da6
7de1
7e18
7e4c
7e7e
7eac
7ed8
7f00
7f26
7f48
7f68
7f85
7f9e
7fb5
7fc9
7fd9
7fe7
7ff1
7ff9
7ffd
7fff
7ffd
7ff9
7ff1
7fe7
7fd9
7fc9
7fb5
7f9e
7f85
7f68
7f48
7f26
7f00
7ed8
7eac
7e7e
7e4c
7e18
7de1
7da6
7d69
7d29
7ce6
7ca1
7c58
7c0c
7bbe
7b6d
7b19
7ac3
7a69
7a0d
79ae
794d
78e8
7882
7818
77ac
773d
76cc
7658
75e1
7568
74ed
746f
73ef
736c
72e7
725f
71d5
7149
70bb
702a
6f97
6f02
6e6b
6dd1
6d36
6c98
6bf8
6b57
6ab3
6a0d
6966
68bc
6811
6764
66b5
6604
6552
649d
63e8
6330
6277
61bc
6100
6043
5f84
5ec3
5e01
5d3e
5c7a
5bb4
5aed
5a24
595b
5891
57c5
56f8
562b
555c
548c
53bc
52ea
5218
5145
5071
4f9d
4ec8
4df2
4d1b
4c44
4b6d
4a95
49bc
48e4
480a
4731
4657
457d
44a2
43c8
42ed
4212
4137
405c
3f81
3ea6
3dcb
3cf0
3c16
3b3b
3a61
3987
38ad
37d4
36fa
3622
3549
3471
339a
32c3
31ed
3117
3042
2f6d
2e99
2dc6
2cf4
2c22
2b51
2a82
29b2
28e4
2817
274a
267f
25b5
24eb
2423
235c
2296
21d1
210d
204b
1f89
1ec9
1e0a
1d4d
1c90
1bd6
1b1c
1a64
19ad
18f8
1844
1791
16e0
1631
1583
14d7
142c
1383
12db
1235
1191
10ee
104d
0fae
0f10
0e74
0dda
0d41
0caa
0c15
0b82
0af0
0a61
09d3
0947
08bc
0834
07ad
0728
06a5
0624
05a5
0527
04ac
0432
03ba
0345
02d1
025e
01ee
0180
0113
00a9
0040
ffd9
ff74
ff11
feb0
fe51
fdf4
fd98
fd3f
fce7
fc91
fc3d
fbeb
fb9b
fb4d
fb00
fab5
fa6d
fa25
f9e0
f99d
f95b
f91b
f8dd
f8a1
f867
f82e
f7f7
f7c2
f78e
f75c
f72c
f6fe
f6d1
f6a6
f67c
f654
f62e
f609
f5e6
f5c5
f5a5
f586
f56a
f54e
f534
f51c
f505
f4f0
f4dc
f4c9
f4b8
f4a8
f499
f48c
f480
f476
f46c
f464
f45e
f458
f454
f451
f44f
f44e
f44e
f450
f452
f456
f45b
f460
f467
f46f
f478
f481
f48c
f497
f4a4
f4b1
f4bf
f4ce
f4de
f4ee
f500
f512
f524
f538
f54c
f561
f577
f58d
f5a3
f5bb
f5d3
f5eb
f604
f61e
f638
f652
f66d
f688
f6a4
f6c0
f6dd
f6fa
f717
f734
f752
f770
f78f
f7ad
f7cc
f7eb
f80b
f82a
f84a
f869
f889
f8a9
f8c9
f8ea
f90a
f92a
f94b
f96b
f98b
f9ac
f9cc
f9ec
fa0c
fa2d
fa4d
fa6d
fa8c
faac
facc
faeb
fb0b
fb2a
fb49
fb68
fb86
fba5
fbc3
fbe1
fbfe
fc1c
fc39
fc56
fc72
fc8f
fcab
fcc7
fce2
fcfd
fd18
fd32
fd4d
fd66
fd80
fd99
fdb2
fdca
fde2
fdf9
fe11
fe27
fe3e
fe54
fe6a
fe7f
fe94
fea8
febc
fed0
fee3
fef6
ff08
ff1a
ff2c
ff3d
ff4d
ff5e
ff6e
ff7d
ff8c
ff9b
ffa9
ffb7
ffc4
ffd1
ffde
ffea
fff5
0001
000c
0016
0020
002a
0034
003c
0045
004d
0055
005d
0064
006a
0071
0077
007d
0082
0087
008c
0090
0094
0098
009b
009e
00a1
00a4
00a6
00a8
00aa
00ab
00ac
00ad
00ae
00ae
00af
00af
00ae
00ae
00ad
00ac
00ab
00aa
00a9
00a7
00a5
00a3
00a1
009f
009d
009a
0098
0095
0092
008f
008c
0089
0086
0083
0080
007c
0079
0075
0072
006e
006b
0067
0064
0060
005c
0059
0055
0052
004e
004b
0047
0044
0040
003d
0039
0036
0033
0030
002d
002a
0027
0024
0021
001f
001c
0019
0017
0015
0013
0011
000f
000d
000b
0009
0008
0007
0005
0004
0003
0002
0002
0001
0001
0000
0000
0000
