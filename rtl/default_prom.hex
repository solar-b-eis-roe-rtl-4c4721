07
e3
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
84
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
00
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
82
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
a4
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
00
0e
0c
0d
09
0b
0a
00
32
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
00
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
46
06
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
90
46
06
01
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
46
06
02
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
46
06
03
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
46
06
04
f8
f8
f8
c8
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
90
f8
f8
f8
f8
46
06
05
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
34
c0
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
94
f8
f8
f8
f8
f8
46
06
06
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
34
c0
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
b0
fb
fb
fb
fb
fb
fb
46
06
07
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
46
06
08
c8
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
90
f8
f8
f8
f8
f8
f8
f8
46
06
09
f8
f8
f8
f8
f8
f8
f8
f8
c8
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
46
06
0a
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
46
06
0b
fb
fb
fb
fb
fb
db
d0
a0
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
b0
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
db
d0
34
c0
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
46
06
0c
f8
f8
f8
f8
f8
f8
c8
94
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
fb
cb
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
86
00
0f
f3
0e
0c
0d
09
0b
0a
00
32
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
02
01
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
01
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
de
02
02
46
86
01
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
9e
9e
de
de
02
04
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
04
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
46
86
02
ce
de
9e
9e
de
de
02
08
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
08
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
de
02
10
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
10
d6
d6
de
46
86
03
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
de
02
20
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
20
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
de
02
40
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
46
86
04
de
9e
9e
de
40
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
de
02
80
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
80
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
de
02
01
d6
d6
de
5e
46
86
05
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
01
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
de
0f
0c
0f
0f
0e
0c
0d
09
0b
0a
00
32
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
00
d6
d6
de
5e
5e
46
86
06
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
0f
f9
0e
0c
0d
09
0b
0a
00
32
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
02
01
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
01
d6
d6
de
5e
5e
de
46
86
07
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
de
02
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
9e
9e
de
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
9e
9e
de
de
02
04
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
46
86
08
de
04
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
de
02
08
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
08
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
de
02
10
d6
d6
de
5e
5e
de
dc
46
86
09
dd
d9
db
ca
ce
de
9e
9e
de
10
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
de
02
20
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
20
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
de
02
46
86
0a
40
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
40
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
de
02
80
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
80
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
46
86
0b
ca
ce
de
9e
9e
de
de
02
01
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
01
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
de
0f
0c
0f
05
0e
0c
0d
09
0b
0a
00
32
d6
d6
de
5e
5e
de
dc
dd
d9
46
86
0c
db
ca
ce
de
de
de
de
00
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
