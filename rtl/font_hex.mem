3c
66
6e
76
66
66
3c
00
18
38
18
18
18
18
7e
00
3c
66
06
0c
30
60
7e
00
3c
66
06
1c
06
66
3c
00
0c
1c
2c
4c
7e
0c
0c
00
7e
60
7c
06
06
66
3c
00
3c
60
7c
66
66
66
3c
00
7e
06
0c
18
30
30
30
00
3c
66
66
3c
66
66
3c
00
3c
66
66
3e
06
0c
38
00
18
3c
66
66
7e
66
66
00
7c
66
66
7c
66
66
7c
00
3c
66
60
60
60
66
3c
00
78
6c
66
66
66
6c
78
00
7e
60
60
7c
60
60
7e
00
7e
60
60
7c
60
60
60
00
3c
60
60
6e
66
66
3c
00
66
66
66
7e
66
66
66
00
3c
18
18
18
18
18
3c
00
0e
06
06
06
66
66
3c
00
66
6c
78
70
78
6c
66
00
60
60
60
60
60
60
7e
00
42
66
7e
6a
62
62
62
00
62
72
7a
6e
66
62
62
00
3c
66
66
66
66
66
3c
00
7c
66
66
7c
60
60
60
00
3c
66
66
66
6e
6c
36
00
7c
66
66
7c
78
6c
66
00
3c
66
60
3c
06
66
3c
00
7e
18
18
18
18
18
18
00
66
66
66
66
66
66
3c
00
66
66
66
66
66
3c
18
00
62
62
62
6a
7e
76
42
00
66
66
3c
18
3c
66
66
00
66
66
66
3c
18
18
18
00
7e
06
0c
18
30
60
7e
00
00
00
3c
06
3e
66
3e
00
60
60
7c
66
66
66
7c
00
00
00
3c
60
60
60
3c
00
06
06
3e
66
66
66
3e
00
00
00
3c
66
7e
60
3c
00
1c
30
30
7c
30
30
30
00
00
3e
66
66
3e
06
3c
00
60
60
7c
66
66
66
66
00
18
00
38
18
18
18
3c
00
06
00
0e
06
06
66
3c
00
60
60
66
6c
78
6c
66
00
38
18
18
18
18
18
3c
00
00
00
6c
7e
6a
6a
62
00
00
00
7c
66
66
66
66
00
00
00
3c
66
66
66
3c
00
00
7c
66
66
7c
60
60
00
00
3e
66
66
3e
06
06
00
00
00
6c
72
60
60
60
00
00
00
3e
60
3c
06
7c
00
30
30
7c
30
30
30
1c
00
00
00
66
66
66
66
3e
00
00
00
66
66
66
3c
18
00
00
00
62
6a
6a
7e
36
00
00
00
66
3c
18
3c
66
00
00
66
66
66
3e
06
3c
00
00
00
7e
0c
18
30
7e
00
00
00
00
00
00
00
00
00
7e
7e
7e
7e
7e
7e
7e
00
