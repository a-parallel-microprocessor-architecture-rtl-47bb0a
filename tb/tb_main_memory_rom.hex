a5c3
b4d2
87e1
96f0
e187
f096
c3a5
d2b4
2d4b
3c5a
0f69
1e78
690f
781e
4b2d
5a3c
