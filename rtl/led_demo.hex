10C1
183E
5001
C002
86C0
A001
66C0
073F
1860
307F
C03E
A035
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
0000
7FFF
