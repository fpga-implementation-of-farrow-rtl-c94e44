0000
0000
0000
0000
0a00
3200
5500
6b00
7200
6900
5200
3000
0500
db00
b700
9c00
8e00
9200
a400
c300
eb00
1700
3f00
5d00
6f00
7100
6300
4800
2100
f800
cd00
ac00
9500
8d00
9700
ae00
d000
fa00
2500
4a00
6500
7200
6f00
5c00
3d00
1400
e900
c100
a300
9200
8f00
9c00
b900
dd00
0900
3300
5400
6b00
7300
6a00
5300
3000
0500
db00
b600
9c00
8e00
9200
a400
c400
ec00
1700
3e00
5d00
7000
7200
6400
4600
2200
f800
cf00
ac00
9500
8e00
9500
ae00
d100
fa00
2500
4b00
6400
7100
6e00
5c00
3c00
1400
ea00
c200
a200
9000
9000
9d00
b900
de00
0800
3200
5300
6a00
7200
6a00
5200
2f00
0600
dc00
b600
9b00
8e00
9200
a400
c400
ec00
1700
3e00
5d00
6f00
7100
6300
4700
2200
f800
ce00
ac00
9500
8d00
9500
ae00
d000
fb00
2400
4900
6400
7200
6e00
5b00
3c00
1400
e900
c200
a300
9100
8f00
9d00
b900
df00
0900
3100
5400
6b00
7200
6a00
5300
3000
0600
dd00
b700
9b00
8e00
9300
a400
c400
ec00
1700
3e00
5d00
6f00
7200
6400
4800
2200
f800
ce00
ac00
9500
8e00
9600
ad00
d100
fa00
2400
4900
6500
7200
6f00
5c00
3c00
1300
ea00
c200
a300
9100
8f00
9c00
b900
df00
0800
3200
5500
6a00
7100
6900
5200
2f00
0600
db00
b600
9c00
8f00
9200
a400
c400
eb00
1600
3e00
5d00
6f00
7000
6300
4800
2200
f700
ce00
ab00
9600
8e00
9600
ad00
d100
f900
2400
4a00
6400
7200
6e00
5b00
3c00
1400
e900
c200
a300
9100
8f00
9d00
b900
de00
0800
3100
