0000
0003
ffcc
00eb
fc98
1b54
44f7
60b5
705c
701a
6094
4221
1b5d
f0cd
c7c5
a78b
9267
8de9
99cc
b32e
d70c
0035
2b06
4f51
6844
721f
6cac
5720
3587
0cdf
e209
bca5
9f57
906a
9025
a02b
be27
e53b
1068
3873
5882
6cd4
719b
6720
4d1f
28f5
ff1e
d3d5
b046
98c2
8d63
92e2
a8ff
ca70
f329
1ddd
4415
61b5
70b2
7003
6094
4238
1aac
ef98
c7a5
a6c4
921f
8d4f
98a1
b2ce
d7e9
00aa
2a1b
4f00
684d
7252
6b28
559a
3557
0d03
e154
bb71
9f36
8fa8
8fcd
a025
bef3
e596
104e
3880
5868
6d88
72c2
677a
4c5b
27cd
fedb
d3e8
b03f
98cb
8d42
93b5
a95a
ca57
f32f
1ddb
4417
61ad
70d2
6f30
6039
4258
1a8d
f04b
c8d1
a70e
91ed
8e27
98f8
b2bb
d7e0
0134
2c33
4ee6
6702
71eb
6c9c
57ed
35e3
0cc0
e22a
bbe8
9e52
8f36
90b0
a099
be09
e543
1067
3873
5882
6cd4
719b
671f
4d27
28d6
ffea
d447
af81
9783
8dd2
9422
a93b
ca5e
f336
1dbb
44e8
6210
7091
702b
5fb8
41ff
19f3
ef36
c7c6
a6a4
92d9
8e65
998b
b410
d744
00ef
2b68
4f2f
686b
714b
6c53
5731
35a2
0c06
e1d1
bbe2
9f1e
8f91
9097
a09f
be08
e540
1077
3831
5a30
6d60
725d
66b5
4ca8
291e
feef
d4c0
aff5
975d
8df4
9365
a837
c929
f3c2
1e21
44eb
613d
7054
6f78
5f3e
42d3
1af8
f04c
c806
a6b2
9206
8e21
98f8
b2c3
d7bf
020d
2c74
4f88
6817
72f6
6d03
570f
356e
0da9
e285
bbb3
9f1b
8fd1
8eea
a00b
bd67
e4da
1089
3854
5935
6e01
71dd
670e
4d22
2904
fedd
d57b
b0fa
9891
8d68
9302
a825
ca36
f270
1d74
