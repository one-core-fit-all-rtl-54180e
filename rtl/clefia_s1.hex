6c
da
c3
e9
4e
9d
0a
3d
b8
36
b4
38
13
34
0c
d9
bf
74
94
8f
b7
9c
e5
dc
9e
07
49
4f
98
2c
b0
93
12
eb
cd
b3
92
e7
41
60
e3
21
27
3b
e6
19
d2
0e
91
11
c7
3f
2a
8e
a1
bc
2b
c8
c5
0f
5b
f3
87
8b
fb
f5
de
20
c6
a7
84
ce
d8
65
51
c9
a4
ef
43
53
25
5d
9b
31
e8
3e
0d
d7
80
ff
69
8a
ba
0b
73
5c
6e
54
15
62
f6
35
30
52
a3
16
d3
28
32
fa
aa
5e
cf
ea
ed
78
33
58
09
7b
63
c0
c1
46
1e
df
a9
99
55
04
c4
86
39
77
82
ec
40
18
90
97
59
dd
83
1f
9a
37
06
24
64
7c
a5
56
48
08
85
d0
61
26
ca
6f
7e
6a
b6
71
a0
70
05
d1
45
8c
23
1c
f0
ee
89
ad
7a
4b
c2
2f
db
5a
4d
76
67
17
2d
f4
cb
b1
4a
a8
b5
22
47
3a
d5
10
4c
72
cc
00
f9
e0
fd
e2
fe
ae
f8
5f
ab
f1
1b
42
81
d6
be
44
29
a6
57
b9
af
f2
d4
75
66
bb
68
9f
50
02
01
3c
7f
8d
1a
88
bd
ac
f7
e4
79
96
a2
fc
6d
b2
6b
03
e1
2e
7d
14
95
1d
