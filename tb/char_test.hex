00
25
4a
6f
94
b9
de
03
01
24
4b
6e
95
b8
df
02
02
27
48
6d
96
bb
dc
01
03
26
49
6c
97
ba
dd
00
04
21
4e
6b
90
bd
da
07
05
20
4f
6a
91
bc
db
06
06
23
4c
69
92
bf
d8
05
07
22
4d
68
93
be
d9
04
08
2d
42
67
9c
b1
d6
0b
09
2c
43
66
9d
b0
d7
0a
0a
2f
40
65
9e
b3
d4
09
0b
2e
41
64
9f
b2
d5
08
0c
29
46
63
98
b5
d2
0f
0d
28
47
62
99
b4
d3
0e
0e
2b
44
61
9a
b7
d0
0d
0f
2a
45
60
9b
b6
d1
0c
10
35
5a
7f
84
a9
ce
13
11
34
5b
7e
85
a8
cf
12
12
37
58
7d
86
ab
cc
11
13
36
59
7c
87
aa
cd
10
14
31
5e
7b
80
ad
ca
17
15
30
5f
7a
81
ac
cb
16
16
33
5c
79
82
af
c8
15
17
32
5d
78
83
ae
c9
14
18
3d
52
77
8c
a1
c6
1b
19
3c
53
76
8d
a0
c7
1a
1a
3f
50
75
8e
a3
c4
19
1b
3e
51
74
8f
a2
c5
18
1c
39
56
73
88
a5
c2
1f
1d
38
57
72
89
a4
c3
1e
1e
3b
54
71
8a
a7
c0
1d
1f
3a
55
70
8b
a6
c1
1c
20
05
6a
4f
b4
99
fe
23
21
04
6b
4e
b5
98
ff
22
22
07
68
4d
b6
9b
fc
21
23
06
69
4c
b7
9a
fd
20
24
01
6e
4b
b0
9d
fa
27
25
00
6f
4a
b1
9c
fb
26
26
03
6c
49
b2
9f
f8
25
27
02
6d
48
b3
9e
f9
24
28
0d
62
47
bc
91
f6
2b
29
0c
63
46
bd
90
f7
2a
2a
0f
60
45
be
93
f4
29
2b
0e
61
44
bf
92
f5
28
2c
09
66
43
b8
95
f2
2f
2d
08
67
42
b9
94
f3
2e
2e
0b
64
41
ba
97
f0
2d
2f
0a
65
40
bb
96
f1
2c
30
15
7a
5f
a4
89
ee
33
31
14
7b
5e
a5
88
ef
32
32
17
78
5d
a6
8b
ec
31
33
16
79
5c
a7
8a
ed
30
34
11
7e
5b
a0
8d
ea
37
35
10
7f
5a
a1
8c
eb
36
36
13
7c
59
a2
8f
e8
35
37
12
7d
58
a3
8e
e9
34
38
1d
72
57
ac
81
e6
3b
39
1c
73
56
ad
80
e7
3a
3a
1f
70
55
ae
83
e4
39
3b
1e
71
54
af
82
e5
38
3c
19
76
53
a8
85
e2
3f
3d
18
77
52
a9
84
e3
3e
3e
1b
74
51
aa
87
e0
3d
3f
1a
75
50
ab
86
e1
3c
40
65
0a
2f
d4
f9
9e
43
41
64
0b
2e
d5
f8
9f
42
42
67
08
2d
d6
fb
9c
41
43
66
09
2c
d7
fa
9d
40
44
61
0e
2b
d0
fd
9a
47
45
60
0f
2a
d1
fc
9b
46
46
63
0c
29
d2
ff
98
45
47
62
0d
28
d3
fe
99
44
48
6d
02
27
dc
f1
96
4b
49
6c
03
26
dd
f0
97
4a
4a
6f
00
25
de
f3
94
49
4b
6e
01
24
df
f2
95
48
4c
69
06
23
d8
f5
92
4f
4d
68
07
22
d9
f4
93
4e
4e
6b
04
21
da
f7
90
4d
4f
6a
05
20
db
f6
91
4c
50
75
1a
3f
c4
e9
8e
53
51
74
1b
3e
c5
e8
8f
52
52
77
18
3d
c6
eb
8c
51
53
76
19
3c
c7
ea
8d
50
54
71
1e
3b
c0
ed
8a
57
55
70
1f
3a
c1
ec
8b
56
56
73
1c
39
c2
ef
88
55
57
72
1d
38
c3
ee
89
54
58
7d
12
37
cc
e1
86
5b
59
7c
13
36
cd
e0
87
5a
5a
7f
10
35
ce
e3
84
59
5b
7e
11
34
cf
e2
85
58
5c
79
16
33
c8
e5
82
5f
5d
78
17
32
c9
e4
83
5e
5e
7b
14
31
ca
e7
80
5d
5f
7a
15
30
cb
e6
81
5c
60
45
2a
0f
f4
d9
be
63
61
44
2b
0e
f5
d8
bf
62
62
47
28
0d
f6
db
bc
61
63
46
29
0c
f7
da
bd
60
64
41
2e
0b
f0
dd
ba
67
65
40
2f
0a
f1
dc
bb
66
66
43
2c
09
f2
df
b8
65
67
42
2d
08
f3
de
b9
64
68
4d
22
07
fc
d1
b6
6b
69
4c
23
06
fd
d0
b7
6a
6a
4f
20
05
fe
d3
b4
69
6b
4e
21
04
ff
d2
b5
68
6c
49
26
03
f8
d5
b2
6f
6d
48
27
02
f9
d4
b3
6e
6e
4b
24
01
fa
d7
b0
6d
6f
4a
25
00
fb
d6
b1
6c
70
55
3a
1f
e4
c9
ae
73
71
54
3b
1e
e5
c8
af
72
72
57
38
1d
e6
cb
ac
71
73
56
39
1c
e7
ca
ad
70
74
51
3e
1b
e0
cd
aa
77
75
50
3f
1a
e1
cc
ab
76
76
53
3c
19
e2
cf
a8
75
77
52
3d
18
e3
ce
a9
74
78
5d
32
17
ec
c1
a6
7b
79
5c
33
16
ed
c0
a7
7a
7a
5f
30
15
ee
c3
a4
79
7b
5e
31
14
ef
c2
a5
78
7c
59
36
13
e8
c5
a2
7f
7d
58
37
12
e9
c4
a3
7e
7e
5b
34
11
ea
c7
a0
7d
7f
5a
35
10
eb
c6
a1
7c
80
a5
ca
ef
14
39
5e
83
81
a4
cb
ee
15
38
5f
82
82
a7
c8
ed
16
3b
5c
81
83
a6
c9
ec
17
3a
5d
80
84
a1
ce
eb
10
3d
5a
87
85
a0
cf
ea
11
3c
5b
86
86
a3
cc
e9
12
3f
58
85
87
a2
cd
e8
13
3e
59
84
88
ad
c2
e7
1c
31
56
8b
89
ac
c3
e6
1d
30
57
8a
8a
af
c0
e5
1e
33
54
89
8b
ae
c1
e4
1f
32
55
88
8c
a9
c6
e3
18
35
52
8f
8d
a8
c7
e2
19
34
53
8e
8e
ab
c4
e1
1a
37
50
8d
8f
aa
c5
e0
1b
36
51
8c
90
b5
da
ff
04
29
4e
93
91
b4
db
fe
05
28
4f
92
92
b7
d8
fd
06
2b
4c
91
93
b6
d9
fc
07
2a
4d
90
94
b1
de
fb
00
2d
4a
97
95
b0
df
fa
01
2c
4b
96
96
b3
dc
f9
02
2f
48
95
97
b2
dd
f8
03
2e
49
94
98
bd
d2
f7
0c
21
46
9b
99
bc
d3
f6
0d
20
47
9a
9a
bf
d0
f5
0e
23
44
99
9b
be
d1
f4
0f
22
45
98
9c
b9
d6
f3
08
25
42
9f
9d
b8
d7
f2
09
24
43
9e
9e
bb
d4
f1
0a
27
40
9d
9f
ba
d5
f0
0b
26
41
9c
a0
85
ea
cf
34
19
7e
a3
a1
84
eb
ce
35
18
7f
a2
a2
87
e8
cd
36
1b
7c
a1
a3
86
e9
cc
37
1a
7d
a0
a4
81
ee
cb
30
1d
7a
a7
a5
80
ef
ca
31
1c
7b
a6
a6
83
ec
c9
32
1f
78
a5
a7
82
ed
c8
33
1e
79
a4
a8
8d
e2
c7
3c
11
76
ab
a9
8c
e3
c6
3d
10
77
aa
aa
8f
e0
c5
3e
13
74
a9
ab
8e
e1
c4
3f
12
75
a8
ac
89
e6
c3
38
15
72
af
ad
88
e7
c2
39
14
73
ae
ae
8b
e4
c1
3a
17
70
ad
af
8a
e5
c0
3b
16
71
ac
b0
95
fa
df
24
09
6e
b3
b1
94
fb
de
25
08
6f
b2
b2
97
f8
dd
26
0b
6c
b1
b3
96
f9
dc
27
0a
6d
b0
b4
91
fe
db
20
0d
6a
b7
b5
90
ff
da
21
0c
6b
b6
b6
93
fc
d9
22
0f
68
b5
b7
92
fd
d8
23
0e
69
b4
b8
9d
f2
d7
2c
01
66
bb
b9
9c
f3
d6
2d
00
67
ba
ba
9f
f0
d5
2e
03
64
b9
bb
9e
f1
d4
2f
02
65
b8
bc
99
f6
d3
28
05
62
bf
bd
98
f7
d2
29
04
63
be
be
9b
f4
d1
2a
07
60
bd
bf
9a
f5
d0
2b
06
61
bc
c0
e5
8a
af
54
79
1e
c3
c1
e4
8b
ae
55
78
1f
c2
c2
e7
88
ad
56
7b
1c
c1
c3
e6
89
ac
57
7a
1d
c0
c4
e1
8e
ab
50
7d
1a
c7
c5
e0
8f
aa
51
7c
1b
c6
c6
e3
8c
a9
52
7f
18
c5
c7
e2
8d
a8
53
7e
19
c4
c8
ed
82
a7
5c
71
16
cb
c9
ec
83
a6
5d
70
17
ca
ca
ef
80
a5
5e
73
14
c9
cb
ee
81
a4
5f
72
15
c8
cc
e9
86
a3
58
75
12
cf
cd
e8
87
a2
59
74
13
ce
ce
eb
84
a1
5a
77
10
cd
cf
ea
85
a0
5b
76
11
cc
d0
f5
9a
bf
44
69
0e
d3
d1
f4
9b
be
45
68
0f
d2
d2
f7
98
bd
46
6b
0c
d1
d3
f6
99
bc
47
6a
0d
d0
d4
f1
9e
bb
40
6d
0a
d7
d5
f0
9f
ba
41
6c
0b
d6
d6
f3
9c
b9
42
6f
08
d5
d7
f2
9d
b8
43
6e
09
d4
d8
fd
92
b7
4c
61
06
db
d9
fc
93
b6
4d
60
07
da
da
ff
90
b5
4e
63
04
d9
db
fe
91
b4
4f
62
05
d8
dc
f9
96
b3
48
65
02
df
dd
f8
97
b2
49
64
03
de
de
fb
94
b1
4a
67
00
dd
df
fa
95
b0
4b
66
01
dc
e0
c5
aa
8f
74
59
3e
e3
e1
c4
ab
8e
75
58
3f
e2
e2
c7
a8
8d
76
5b
3c
e1
e3
c6
a9
8c
77
5a
3d
e0
e4
c1
ae
8b
70
5d
3a
e7
e5
c0
af
8a
71
5c
3b
e6
e6
c3
ac
89
72
5f
38
e5
e7
c2
ad
88
73
5e
39
e4
e8
cd
a2
87
7c
51
36
eb
e9
cc
a3
86
7d
50
37
ea
ea
cf
a0
85
7e
53
34
e9
eb
ce
a1
84
7f
52
35
e8
ec
c9
a6
83
78
55
32
ef
ed
c8
a7
82
79
54
33
ee
ee
cb
a4
81
7a
57
30
ed
ef
ca
a5
80
7b
56
31
ec
f0
d5
ba
9f
64
49
2e
f3
f1
d4
bb
9e
65
48
2f
f2
f2
d7
b8
9d
66
4b
2c
f1
f3
d6
b9
9c
67
4a
2d
f0
f4
d1
be
9b
60
4d
2a
f7
f5
d0
bf
9a
61
4c
2b
f6
f6
d3
bc
99
62
4f
28
f5
f7
d2
bd
98
63
4e
29
f4
f8
dd
b2
97
6c
41
26
fb
f9
dc
b3
96
6d
40
27
fa
fa
df
b0
95
6e
43
24
f9
fb
de
b1
94
6f
42
25
f8
fc
d9
b6
93
68
45
22
ff
fd
d8
b7
92
69
44
23
fe
fe
db
b4
91
6a
47
20
fd
ff
da
b5
90
6b
46
21
fc
