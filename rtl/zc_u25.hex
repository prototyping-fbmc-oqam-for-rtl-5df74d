7fff0000
99f8b2b7
2ec388da
a22ca8f1
7d75195d
7a4f25ba
c0019127
620dadba
e3858337
4fce6412
3a6571e6
2ec388da
7a4f25ba
620dadba
c0016ed9
a22c570f
7d75195d
e3857cc9
4fce6412
99f8b2b7
c0009127
c0006ed9
99f8b2b7
816f1314
7a4fda46
7d75195d
e3858337
7fff0000
620dadba
a22c570f
816f1314
816f1314
a22c570f
620dadba
7fff0000
e3858337
7d75195d
7a4fda46
816f1314
99f8b2b7
c0016ed9
c0009127
99f8b2b7
4fce6412
e3857cc9
7d75195d
a22c570f
c0006ed9
620dadba
7a4f25ba
2ec388da
3a6571e6
4fce6412
e3858337
620dadba
c0009127
7a4f25ba
7d75195d
a22ca8f1
2ec388da
99f8b2b7
7fff0000
