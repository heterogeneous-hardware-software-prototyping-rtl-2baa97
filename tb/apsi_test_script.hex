100
100
100
101
20a
211
218
21f
226
22d
234
23b
242
249
250
257
25e
265
26c
273
27a
281
288
28f
296
29d
2a4
2ab
2b2
2b9
2c0
2c7
2ce
2d5
2dc
2e3
2ea
2f1
2f8
2ff
206
20d
214
21b
222
229
230
237
23e
245
24c
253
25a
261
268
26f
276
27d
284
28b
292
299
2a0
2a7
2ae
2b5
2bc
2c3
100
100
100
101
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
300
400
000
