0192
04b6
07d9
0afb
0e1c
113a
1455
176e
1a82
1d93
209f
23a6
26a8
29a3
2c99
2f87
326e
354d
3824
3af2
3db8
4073
4325
45cd
4869
4afb
4d81
4ffb
5268
54c9
571d
5964
5b9c
5dc7
5fe3
61f0
63ee
65dd
67bc
698b
6b4a
6cf8
6e96
7022
719d
7307
745f
75a5
76d8
77fa
7909
7a05
7aee
7bc5
7c88
7d39
7dd5
7e5f
7ed5
7f37
7f86
7fc1
7fe9
7ffd
