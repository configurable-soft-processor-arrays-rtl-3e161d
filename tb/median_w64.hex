30400040
40621000
6c200000
3081ffff
6c048000
30a1ffff
bc050020
10c30000
6ce00000
6c078000
30c6ffff
bc26fff4
b810ffe8
30a5ffff
31001000
10c30000
6ce00000
f0e80000
31080001
30c6ffff
bc26fff0
11400000
31a2ffff
11600000
418a1000
118c5800
bc0a00b4
bc0b00b0
15ca6800
bc0e00a8
15cb6800
bc0e00a0
16026000
12501000
12721000
e2300fff
fa203000
e2301000
fa203004
e2301001
fa203008
e2320fff
fa20300c
e2321000
fa203010
e2321001
fa203014
e2330fff
fa203018
e2331000
fa20301c
e2331001
fa203020
32800001
12b4a000
12b5a800
ead53000
32f5fffc
bc57001c
eb173000
1738b001
bcb90010
fb173004
b810ffec
32f7fffc
fad73004
32940001
3354fff7
bc3affc8
eb603010
b8000008
e36c1000
f36c2000
316b0001
15cb1000
bc2eff34
314a0001
15ca1000
bc2eff24
6ce00000
33870001
bc1c000c
6c078000
b800fff0
31002000
10c30000
e0e80000
6c078000
31080001
30c6ffff
bc26fff0
30e0ffff
6c078000
b810fea4
30a1ffff
