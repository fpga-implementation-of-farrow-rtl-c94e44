0a
32
55
6b
72
69
52
30
05
db
b7
9c
8e
92
a4
c3
eb
17
3f
5d
6f
71
63
48
21
f8
cd
ac
95
8d
97
ae
d0
fa
25
4a
65
72
6f
5c
3d
14
e9
c1
a3
92
8f
9c
b9
dd
09
33
54
6b
73
6a
53
30
05
db
b6
9c
8e
92
a4
c4
ec
17
3e
5d
70
72
64
46
22
f8
cf
ac
95
8e
95
ae
d1
fa
25
4b
64
71
6e
5c
3c
14
ea
c2
a2
90
90
9d
b9
de
08
32
53
6a
72
6a
52
2f
06
dc
b6
9b
8e
92
a4
c4
ec
17
3e
5d
6f
71
63
47
22
f8
ce
ac
95
8d
95
ae
d0
fb
24
49
64
72
6e
5b
3c
14
e9
c2
a3
91
8f
9d
b9
df
09
31
54
6b
72
6a
53
30
06
dd
b7
9b
8e
93
a4
c4
ec
17
3e
5d
6f
72
64
48
22
f8
ce
ac
95
8e
96
ad
d1
fa
24
49
65
72
6f
5c
3c
13
ea
c2
a3
91
8f
9c
b9
df
08
32
55
6a
71
69
52
2f
06
db
b6
9c
8f
92
a4
c4
eb
16
3e
5d
6f
70
63
48
22
f7
ce
ab
96
8e
96
ad
d1
f9
24
4a
64
72
6e
5b
3c
14
e9
c2
a3
91
8f
9d
b9
de
08
31
54
6a
72
6a
