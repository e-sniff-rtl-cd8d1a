00
00
00
00
00
00
00
00
ff
ff
ff
ff
ff
ff
ff
ff
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
18
3c
3c
18
18
00
18
00
6c
6c
00
00
00
00
00
00
6c
6c
fe
6c
fe
6c
6c
00
30
7c
c0
78
0c
f8
30
00
00
c6
cc
18
30
66
c6
00
38
6c
38
76
dc
cc
76
00
60
60
c0
00
00
00
00
00
18
30
60
60
60
30
18
00
60
30
18
18
18
30
60
00
00
66
3c
ff
3c
66
00
00
00
30
30
fc
30
30
00
00
00
00
00
00
00
30
30
60
00
00
00
fc
00
00
00
00
00
00
00
00
00
30
30
00
06
0c
18
30
60
c0
80
00
7c
c6
ce
de
f6
e6
7c
00
30
70
30
30
30
30
fc
00
78
cc
0c
38
60
cc
fc
00
78
cc
0c
38
0c
cc
78
00
1c
3c
6c
cc
fe
0c
1e
00
fc
c0
f8
0c
0c
cc
78
00
38
60
c0
f8
cc
cc
78
00
fc
cc
0c
18
30
30
30
00
78
cc
cc
78
cc
cc
78
00
78
cc
cc
7c
0c
18
70
00
00
30
30
00
00
30
30
00
00
30
30
00
00
30
30
60
18
30
60
c0
60
30
18
00
00
00
fc
00
00
fc
00
00
60
30
18
0c
18
30
60
00
78
cc
0c
18
30
00
30
00
7c
c6
de
de
de
c0
78
00
30
78
cc
cc
fc
cc
cc
00
fc
66
66
7c
66
66
fc
00
3c
66
c0
c0
c0
66
3c
00
f8
6c
66
66
66
6c
f8
00
fe
62
68
78
68
62
fe
00
fe
62
68
78
68
60
f0
00
3c
66
c0
c0
ce
66
3e
00
cc
cc
cc
fc
cc
cc
cc
00
78
30
30
30
30
30
78
00
1e
0c
0c
0c
cc
cc
78
00
e6
66
6c
78
6c
66
e6
00
f0
60
60
60
62
66
fe
00
c6
ee
fe
fe
d6
c6
c6
00
c6
e6
f6
de
ce
c6
c6
00
38
6c
c6
c6
c6
6c
38
00
fc
66
66
7c
60
60
f0
00
78
cc
cc
cc
dc
78
1c
00
fc
66
66
7c
6c
66
e6
00
78
cc
e0
70
1c
cc
78
00
fc
b4
30
30
30
30
78
00
cc
cc
cc
cc
cc
cc
fc
00
cc
cc
cc
cc
cc
78
30
00
c6
c6
c6
d6
fe
ee
c6
00
c6
c6
6c
38
38
6c
c6
00
cc
cc
cc
78
30
30
78
00
fe
c6
8c
18
32
66
fe
00
78
60
60
60
60
60
78
00
c0
60
30
18
0c
06
02
00
78
18
18
18
18
18
78
00
10
38
6c
c6
00
00
00
00
00
00
00
00
00
00
00
ff
30
30
18
00
00
00
00
00
00
00
78
0c
7c
cc
76
00
e0
60
60
7c
66
66
dc
00
00
00
78
cc
c0
cc
78
00
1c
0c
0c
7c
cc
cc
76
00
00
00
78
cc
fc
c0
78
00
38
6c
60
f0
60
60
f0
00
00
00
76
cc
cc
7c
0c
f8
e0
60
6c
76
66
66
e6
00
30
00
70
30
30
30
78
00
0c
00
0c
0c
0c
cc
cc
78
e0
60
66
6c
78
6c
e6
00
70
30
30
30
30
30
78
00
00
00
cc
fe
fe
d6
c6
00
00
00
f8
cc
cc
cc
cc
00
00
00
78
cc
cc
cc
78
00
00
00
dc
66
66
7c
60
f0
00
00
76
cc
cc
7c
0c
1e
00
00
dc
76
66
60
f0
00
00
00
7c
c0
78
0c
f8
00
10
30
7c
30
30
34
18
00
00
00
cc
cc
cc
cc
76
00
00
00
cc
cc
cc
78
30
00
00
00
c6
d6
fe
fe
6c
00
00
00
c6
6c
38
6c
c6
00
00
00
cc
cc
cc
7c
0c
f8
00
00
fc
98
30
64
fc
00
1c
30
30
e0
30
30
1c
00
18
18
18
00
18
18
18
00
e0
30
30
1c
30
30
e0
00
76
dc
00
00
00
00
00
00
00
00
00
00
00
00
00
00
