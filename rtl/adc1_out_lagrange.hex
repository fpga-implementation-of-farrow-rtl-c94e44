0000
0005
ffd0
00eb
fc93
1b4b
44ef
60b0
705b
7020
60a0
4231
1b6e
f0dd
c7d3
a794
9269
8de5
99c3
b320
d6fb
0024
2af7
4f46
683f
7221
6cb3
572d
3597
0cf0
e219
bcb1
9f5d
906b
901f
a020
be18
e52a
1058
3866
5879
6cd1
719f
672a
4d2d
2906
ff2f
d3e4
b050
98c6
8d61
92db
a8f3
ca60
f318
1dcd
4409
61ae
70b1
7008
60a0
4248
1abd
efa8
c7b3
a6cd
9222
8d4b
9897
b2c0
d7d8
0099
2a0c
4ef5
6848
7253
6b30
55a7
3568
0d14
e164
bb7d
9f3c
8fa9
8fc7
a019
bee4
e586
103e
3873
585f
6d85
72c6
6784
4c69
27de
feec
d3f6
b049
98cf
8d41
93ad
a94d
ca47
f31e
1dcc
440b
61a6
70d1
6f36
6044
4267
1a9e
f05c
c8df
a716
91f0
8e23
98ef
b2ad
d7cf
0123
2c25
4edc
66fd
71ed
6ca4
57fa
35f3
0cd1
e23a
bbf4
9e59
8f36
90aa
a08d
bdf9
e532
1057
3866
5879
6cd1
719f
6729
4d35
28e7
fffb
d456
af8b
9787
8dd1
941a
a92f
ca4e
f325
1dac
44dc
620a
7090
7031
5fc4
420e
1a04
ef46
c7d4
a6ac
92dc
8e61
9981
b402
d734
00de
2b59
4f24
6866
714d
6c5b
573e
35b2
0c17
e1e0
bbee
9f25
8f92
9091
a094
bdf9
e52f
1067
3823
5a28
6d5e
7261
66bf
4cb6
292f
ff00
d4cf
b000
9761
8df3
935d
a82a
c919
f3b1
1e11
44e0
6137
7054
6f7e
5f49
42e2
1b09
f05d
c814
a6bb
9208
8e1d
98ef
b2b5
d7ae
01fd
2c65
4f7d
6812
72f8
6d0b
571c
357e
0dba
e295
bbbf
9f22
8fd2
8ee4
a000
bd57
e4c9
1078
3846
592c
6dfe
71e1
6718
4d30
2914
feee
d589
b105
9896
8d67
92fa
a818
ca26
f25f
1d64
