30200064
3040fff9
00611000
6c038000
08800000
6c048000
04a20800
6c058000
b0001234
a0c05678
6c068000
a4e6ff00
6c078000
89063800
6c088000
8d263800
6c098000
91420001
6c0a8000
91610041
6c0b8000
39800000
6c0c8000
91420001
91a10021
6c0d8000
31c00080
91ee0060
6c0f8000
62020009
6c108000
42210800
6c118000
16411001
6c128000
16611003
6c138000
f8c00800
e2800801
6c148000
e6a00802
6c158000
f0200803
eac00800
6c168000
32e00800
33000002
f4570000
cb370000
6c198000
c757c000
6c1a8000
13600000
be1b000c
337b0005
337b0064
6c1b8000
bc3b0008
337b03e8
6c1b8000
bc5b0008
337b0001
6c1b8000
b9f4004c
33800001
6c1c8000
6fa00000
33bd0001
6c1d8000
6fc04000
0be00000
6c1f8000
33c0000a
33deffff
bc3efffc
6fc04000
6c1e8000
0be00000
6c1f8000
3020004d
6c018000
b8000000
b60f0008
339c0002
