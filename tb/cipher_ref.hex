// Ciphertexts of the 8-bit reduced ciphers under key 80'h0123456789abcdef0123:
// entries 0-255 GIFT(p), 256-511 PRESENT(p), 512-767 LBlock-S(p) for p = 0..255.
f0
a3
46
a8
ea
96
18
2f
66
f3
13
ae
14
09
c3
e7
e5
7c
e3
1f
de
dd
cf
4b
3f
fb
02
fe
06
86
97
4e
88
d6
c9
bb
c8
9d
64
9c
81
01
49
59
15
85
4f
31
cd
ec
6e
f5
54
58
07
89
00
ed
79
95
4d
4a
51
38
0f
12
cb
f8
0b
70
56
5f
61
65
7d
ef
42
93
f6
53
48
a0
c2
1e
52
ac
8e
fd
ad
c5
04
e1
9b
dc
d9
d7
2d
b4
e9
a5
19
73
78
34
1b
20
e0
23
60
a2
b7
39
b8
0a
da
72
b1
90
44
b6
d2
f2
b2
63
f4
a4
ba
7f
c1
e4
ee
b5
84
05
5c
ff
8c
d5
0e
62
2b
5d
b9
f7
c7
6d
08
2a
be
c4
3a
80
27
26
67
b3
bf
a7
55
3e
9f
1c
ca
7e
47
8d
76
87
6b
30
6a
aa
fa
32
e8
91
35
6f
d0
98
5e
50
8f
24
68
9e
17
a6
fc
eb
36
3b
75
83
57
7a
0d
bd
ce
c0
e2
d8
c6
7b
cc
43
29
af
25
8b
ab
37
df
03
74
45
f1
1d
22
f9
d4
5b
28
e6
1a
bc
a1
82
0c
21
40
b0
6c
92
71
d3
69
2c
3c
5a
2e
33
d1
3d
a9
41
11
8a
94
4c
77
9a
10
db
99
16
fa
4f
55
a4
ed
98
bf
4a
25
e1
f1
b7
95
f9
e4
a1
b0
72
e6
b6
a3
16
31
e0
82
12
ee
4d
5b
d3
09
ad
38
d5
2f
18
47
32
88
44
8e
c3
0d
28
68
f5
34
5e
5f
8c
d0
cc
04
ba
2c
73
de
eb
7c
b1
a8
80
6e
61
3f
e7
43
3b
49
9e
2d
c9
db
66
ab
a0
da
30
c6
91
56
62
1f
9b
78
7e
87
21
c5
ce
cf
23
08
5c
2e
48
81
07
4c
fd
3e
ac
96
83
bc
52
c7
60
6b
00
be
1b
46
ff
75
3c
86
b5
c2
74
14
15
2a
d7
e3
6c
ae
e5
7a
67
63
1a
8a
93
aa
37
1d
fc
7d
71
06
20
f0
fb
33
26
7f
6d
b2
79
fe
2b
69
df
41
4e
c8
e9
ec
22
9c
3d
9d
5d
50
d4
9f
3a
85
a6
40
45
f4
0c
27
5a
f6
8d
b9
59
bb
ef
8b
bd
51
53
94
1e
7b
a9
54
a7
b8
d6
01
6f
c4
03
17
36
6a
35
f2
d8
ca
70
d9
e2
05
dd
57
92
84
a5
b3
a2
13
9a
76
f3
0a
c0
d1
29
cb
d2
dc
02
0b
64
1c
97
77
99
24
10
89
8f
f8
f7
e8
af
cd
11
b4
19
58
ea
65
4b
c1
0e
0f
39
42
90
0d
ce
d4
2c
d6
9a
cf
86
02
cd
87
67
72
32
0c
e2
6b
2d
4a
75
c3
db
a6
8d
35
66
56
fc
a2
2f
6c
aa
51
9d
8b
c4
b9
d0
f7
0b
3e
a3
21
01
3d
b5
7a
d2
77
fb
d1
dd
5c
14
f6
07
90
71
48
38
2e
73
7c
06
27
53
ef
f3
17
ae
96
ca
63
c6
84
a8
11
0a
df
61
6d
57
c0
10
bb
20
c2
6a
c9
24
44
76
05
a4
70
dc
b3
8e
f2
e1
d5
28
c7
ec
d3
f1
74
a7
7f
33
22
23
29
0e
08
b1
e9
34
93
92
a1
9b
5e
ac
09
3a
8c
2a
36
7e
43
b8
cb
bc
1d
e0
83
fa
9e
d9
68
e6
99
be
af
50
fe
13
47
1f
a9
c5
89
2b
30
00
37
49
a0
45
62
1e
f5
95
fd
4b
60
ab
4e
ed
c8
b6
46
1c
ee
5b
3b
ad
65
1a
52
d7
7d
b2
ea
19
03
3f
cc
85
9c
e8
b7
4f
58
39
59
18
8f
da
b0
e7
55
f4
4c
16
e3
82
ba
94
91
54
15
5a
a5
eb
04
69
42
97
3c
64
b4
bd
f8
25
4d
bf
1b
6f
81
5f
31
98
de
ff
6e
40
c1
e5
f0
88
5d
41
7b
8a
79
26
9f
78
d8
e4
12
0f
f9
80
