ff
ff
00
ff
ff
7f
3f
1f
0f
07
03
01
00
80
c0
e0
f0
f8
fc
fc
fc
fc
fc
fc
fc
00
00
00
00
00
00
00
