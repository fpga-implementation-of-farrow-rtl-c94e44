00
2a
4e
67
72
6d
59
37
0f
e4
bd
a0
8f
90
a0
bd
e3
0d
37
58
6d
72
68
4e
2a
00
d6
b3
99
8f
93
a8
c9
f2
1d
43
60
70
70
61
43
1d
f2
c8
a8
94
8d
98
b2
d6
00
2a
4e
68
72
6d
59
37
0e
e3
bd
9f
8f
8f
9f
bd
e4
0d
36
58
6d
72
66
4d
2a
00
d5
b2
99
8e
93
a8
ca
f2
1d
43
60
71
71
61
42
1c
f2
c8
a8
94
8d
99
b2
d6
00
2a
4e
68
72
6c
59
37
0e
e4
be
9f
8f
90
9f
bd
e4
0e
38
57
6c
72
68
4f
2a
00
d6
b2
98
8e
94
a8
c9
f2
1d
43
60
70
70
61
43
1d
f3
c8
a7
93
8e
99
b2
d6
00
2a
4f
68
72
6d
58
37
0d
e3
bd
9f
90
90
a0
be
e3
0e
37
58
6d
71
68
4e
2a
ff
d6
b2
99
8e
94
a8
c9
f2
1d
43
62
70
71
60
43
1d
f2
c9
a7
93
8e
98
b1
d5
01
2a
4f
67
72
6c
58
38
0e
e4
bd
9f
8f
90
9f
bd
e4
0f
38
58
6d
73
68
4e
2a
01
d6
b2
99
8e
92
a8
c8
f2
1d
43
61
71
70
61
43
1d
f2
ca
a8
94
8d
98
b1
d6
ff
2a
4e
67
72
6d
