01
15
45
88
88
88
3c
0f
00
00
00
46
00
00
34
80
f8
f8
f8
f8
f8
c0
f8
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
46
80
00
1f
04
06
04
05
01
03
02
8c
0c
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
46
01
00
34
80
f8
f8
f8
f8
f8
f8
30
90
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
c8
a0
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
f8
d0
34
c0
f8
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
46
81
00
0f
03
0e
0c
0d
09
0b
0a
00
02
d6
d6
de
5e
5e
de
dc
dd
d9
db
ca
ce
de
de
de
de
05
d6
d6
de
5e
5e
de
dc
dd
d9
db
ca
ce
de
9e
9e
de
0f
0c
6c
0c
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
