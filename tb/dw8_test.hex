6c200000
6c400000
00611000
08800000
6c038000
6c048000
14a11003
6c058000
40c11000
6c068000
f82000f0
e0e000f3
6c078000
e90000f0
6c088000
31200001
bca10008
31200000
6c098000
b800ffb4
