13579bdf
02468ace
deadbeef
00000001
80000000
ffffffff
12345678
9abcdef0
