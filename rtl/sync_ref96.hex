d0740000
534c0000
429d0000
495a0000
42dc0000
51050000
18d40000
9cdd0000
24750000
f6940000
f90c0000
0fb50000
a08c0000
7eb70000
02410000
20130000
b64d0000
20130000
02410000
7eb70000
a08c0000
0fb50000
f90c0000
f6940000
24750000
9cdd0000
18d40000
51050000
42dc0000
495a0000
429d0000
534c0000
d074633d
c8d9d9fa
2797ee36
ee144bf0
0465b055
c61b62d0
5c88ff61
f9b8bc3e
b93fd02e
a2fa088d
a6500022
ae22e7bb
ebf3afd1
4c18f138
fdf45b74
bc72d0f8
479d30e5
bc72d0f8
fdf45b74
4c18f138
ebf3afd1
ae22e7bb
a6500022
a2fa088d
b93fd02e
f9b8bc3e
5c88ff61
c61b62d0
0465b055
ee144bf0
2797ee36
c8d9d9fa
0000633d
00002fe7
0000f7ac
0000d2b7
0000e7aa
000011b7
00006254
00001796
0000c7b6
0000346a
00000d89
0000d0aa
00005265
00002451
0000c53f
0000b342
0000b886
0000b342
0000c53f
00002451
00005265
0000d0aa
00000d89
0000346a
0000c7b6
00001796
00006254
000011b7
0000e7aa
0000d2b7
0000f7ac
00002fe7
