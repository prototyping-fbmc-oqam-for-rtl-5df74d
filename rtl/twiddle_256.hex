7fff0000
7ff5fcdc
7fd8f9b8
7fa6f696
7f61f374
7f09f055
7e9ced38
7e1dea1e
7d89e707
7ce3e3f5
7c29e0e6
7b5cdddd
7a7cdad8
7989d7da
7884d4e1
776bd1ef
7641cf05
7504cc21
73b5c946
7254c674
70e2c3aa
6f5ec0e9
6dc9be32
6c23bb86
6a6db8e4
68a6b64c
66cfb3c1
64e8b141
62f1aecd
60ebac65
5ed7aa0b
5cb3a7be
5a82a57e
5842a34d
55f5a129
539b9f15
51339d0f
4ebf9b18
4c3f9931
49b4975a
471c9593
447a93dd
41ce9237
3f1790a2
3c568f1e
398c8dac
36ba8c4b
33df8afc
30fb89bf
2e118895
2b1f877c
28268677
25288584
222384a4
1f1a83d7
1c0b831d
18f98277
15e281e3
12c88164
0fab80f7
0c8c809f
096a805a
06488028
0324800b
00008001
fcdc800b
f9b88028
f696805a
f374809f
f05580f7
ed388164
ea1e81e3
e7078277
e3f5831d
e0e683d7
dddd84a4
dad88584
d7da8677
d4e1877c
d1ef8895
cf0589bf
cc218afc
c9468c4b
c6748dac
c3aa8f1e
c0e990a2
be329237
bb8693dd
b8e49593
b64c975a
b3c19931
b1419b18
aecd9d0f
ac659f15
aa0ba129
a7bea34d
a57ea57e
a34da7be
a129aa0b
9f15ac65
9d0faecd
9b18b141
9931b3c1
975ab64c
9593b8e4
93ddbb86
9237be32
90a2c0e9
8f1ec3aa
8dacc674
8c4bc946
8afccc21
89bfcf05
8895d1ef
877cd4e1
8677d7da
8584dad8
84a4dddd
83d7e0e6
831de3f5
8277e707
81e3ea1e
8164ed38
80f7f055
809ff374
805af696
8028f9b8
800bfcdc
