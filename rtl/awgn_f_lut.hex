b1
a3
9d
99
95
92
90
8e
8c
8a
89
88
86
85
84
83
82
81
80
7f
7f
7e
7d
7c
7c
7b
7a
7a
79
79
78
77
77
76
76
75
75
74
74
73
73
73
72
72
71
71
71
70
70
6f
6f
6f
6e
6e
6e
6d
6d
6d
6c
6c
6c
6b
6b
6b
6a
6a
6a
6a
69
69
69
68
68
68
68
67
67
67
67
66
66
66
66
65
65
65
65
64
64
64
64
63
63
63
63
63
62
62
62
62
62
61
61
61
61
60
60
60
60
60
5f
5f
5f
5f
5f
5f
5e
5e
5e
5e
5e
5d
5d
5d
5d
5d
5d
5c
5c
5c
5c
5c
5c
5b
5b
5b
5b
5b
5b
5a
5a
5a
5a
5a
5a
59
59
59
59
59
59
58
58
58
58
58
58
58
57
57
57
57
57
57
57
56
56
56
56
56
56
56
55
55
55
55
55
55
55
54
54
54
54
54
54
54
54
53
53
53
53
53
53
53
52
52
52
52
52
52
52
52
51
51
51
51
51
51
51
51
50
50
50
50
50
50
50
50
50
4f
4f
4f
4f
4f
4f
4f
4f
4e
4e
4e
4e
4e
4e
4e
4e
4e
4d
4d
4d
4d
4d
4d
4d
4d
4d
4c
4c
4c
4c
4c
4c
4c
4c
4c
4c
4b
4b
4b
4b
4b
4b
4b
4b
4b
4a
4a
4a
4a
4a
4a
4a
4a
4a
4a
49
49
49
49
49
49
49
49
49
49
48
48
48
48
48
48
48
48
48
48
47
47
47
47
47
47
47
47
47
47
46
46
46
46
46
46
46
46
46
46
46
45
45
45
45
45
45
45
45
45
45
45
44
44
44
44
44
44
44
44
44
44
44
43
43
43
43
43
43
43
43
43
43
43
42
42
42
42
42
42
42
42
42
42
42
41
41
41
41
41
41
41
41
41
41
41
41
40
40
40
40
40
40
40
40
40
40
40
40
3f
3f
3f
3f
3f
3f
3f
3f
3f
3f
3f
3f
3e
3e
3e
3e
3e
3e
3e
3e
3e
3e
3e
3e
3d
3d
3d
3d
3d
3d
3d
3d
3d
3d
3d
3d
3c
3c
3c
3c
3c
3c
3c
3c
3c
3c
3c
3c
3b
3b
3b
3b
3b
3b
3b
3b
3b
3b
3b
3b
3b
3a
3a
3a
3a
3a
3a
3a
3a
3a
3a
3a
3a
3a
39
39
39
39
39
39
39
39
39
39
39
39
39
38
38
38
38
38
38
38
38
38
38
38
38
38
37
37
37
37
37
37
37
37
37
37
37
37
37
36
36
36
36
36
36
36
36
36
36
36
36
36
35
35
35
35
35
35
35
35
35
35
35
35
35
34
34
34
34
34
34
34
34
34
34
34
34
34
34
33
33
33
33
33
33
33
33
33
33
33
33
33
32
32
32
32
32
32
32
32
32
32
32
32
32
32
31
31
31
31
31
31
31
31
31
31
31
31
31
31
30
30
30
30
30
30
30
30
30
30
30
30
30
2f
2f
2f
2f
2f
2f
2f
2f
2f
2f
2f
2f
2f
2f
2e
2e
2e
2e
2e
2e
2e
2e
2e
2e
2e
2e
2e
2e
2d
2d
2d
2d
2d
2d
2d
2d
2d
2d
2d
2d
2d
2c
2c
2c
2c
2c
2c
2c
2c
2c
2c
2c
2c
2c
2c
2b
2b
2b
2b
2b
2b
2b
2b
2b
2b
2b
2b
2b
2b
2a
2a
2a
2a
2a
2a
2a
2a
2a
2a
2a
2a
2a
29
29
29
29
29
29
29
29
29
29
29
29
29
29
28
28
28
28
28
28
28
28
28
28
28
28
28
28
27
27
27
27
27
27
27
27
27
27
27
27
27
26
26
26
26
26
26
26
26
26
26
26
26
26
25
25
25
25
25
25
25
25
25
25
25
25
25
25
24
24
24
24
24
24
24
24
24
24
24
24
24
23
23
23
23
23
23
23
23
23
23
23
23
23
22
22
22
22
22
22
22
22
22
22
22
22
22
21
21
21
21
21
21
21
21
21
21
21
21
20
20
20
20
20
20
20
20
20
20
20
20
20
1f
1f
1f
1f
1f
1f
1f
1f
1f
1f
1f
1f
1e
1e
1e
1e
1e
1e
1e
1e
1e
1e
1e
1e
1d
1d
1d
1d
1d
1d
1d
1d
1d
1d
1d
1d
1c
1c
1c
1c
1c
1c
1c
1c
1c
1c
1c
1b
1b
1b
1b
1b
1b
1b
1b
1b
1b
1b
1b
1a
1a
1a
1a
1a
1a
1a
1a
1a
1a
1a
19
19
19
19
19
19
19
19
19
19
18
18
18
18
18
18
18
18
18
18
18
17
17
17
17
17
17
17
17
17
17
16
16
16
16
16
16
16
16
16
16
15
15
15
15
15
15
15
15
15
14
14
14
14
14
14
14
14
14
13
13
13
13
13
13
13
13
13
12
12
12
12
12
12
12
12
11
11
11
11
11
11
11
11
10
10
10
10
10
10
10
10
0f
0f
0f
0f
0f
0f
0f
0e
0e
0e
0e
0e
0e
0d
0d
0d
0d
0d
0d
0d
0c
0c
0c
0c
0c
0b
0b
0b
0b
0b
0b
0a
0a
0a
0a
0a
09
09
09
09
08
08
08
08
07
07
07
06
06
06
05
05
05
04
04
03
02
01
