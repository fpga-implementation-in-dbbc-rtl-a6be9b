00
01
02
03
04
04
05
06
07
07
08
09
0a
0b
0b
0c
0d
0e
0e
0f
10
11
11
12
13
14
15
15
16
17
18
18
19
1a
1b
1b
1c
1d
1e
1e
1f
20
21
21
22
23
24
24
25
26
27
27
28
29
2a
2a
2b
2c
2d
2d
2e
2f
30
30
31
32
32
33
34
35
35
36
37
37
38
39
39
3a
3b
3c
3c
3d
3e
3e
3f
40
40
41
42
42
43
44
44
45
46
46
47
48
48
49
49
4a
4b
4b
4c
4d
4d
4e
4e
4f
50
50
51
51
52
53
53
54
54
55
56
56
57
57
58
58
59
5a
5a
5b
5b
5c
5c
5d
5d
5e
5e
5f
5f
60
60
61
61
62
62
63
63
64
64
65
65
66
66
67
67
68
68
69
69
69
6a
6a
6b
6b
6c
6c
6c
6d
6d
6e
6e
6e
6f
6f
6f
70
70
71
71
71
72
72
72
73
73
73
74
74
74
75
75
75
75
76
76
76
77
77
77
77
78
78
78
78
79
79
79
79
7a
7a
7a
7a
7b
7b
7b
7b
7b
7b
7c
7c
7c
7c
7c
7c
7d
7d
7d
7d
7d
7d
7d
7e
7e
7e
7e
7e
7e
7e
7e
7e
7e
7e
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
