3f800000
3f475f7d
3f1b4598
3ef1da07
3ebc5ab2
3e92b0c2
3e647c3c
3e31f1cc
3e0a9555
3dd7db8c
3da81c2e
3d82ec9c
3d4bed86
3d1ed1b4
3cf76081
3cc0a84a
3c960aae
3c69b489
3c360282
3c0dbfd7
3bdcc9ff
3babf360
3b85ea53
3b509633
3b227290
3afd074b
3ac50f0c
3a997833
3a6f0b5d
3a3a2aff
3a10fcdd
39e1d549
39afe108
3988f988
39555a20
392628a3
39016791
38c98f8d
389cf9c5
3874816b
383e6bce
38144cd4
37e6fe13
37b3e5aa
378c1aa1
375a39eb
3729f46c
37045c64
36ce2a62
36a08fd8
367a176a
3642c57c
3617b02a
35ec450a
35b801cc
358f4e08
355f3638
352dd668
35076282
34d2e025
34a43ae5
347fce14
3447389c
341b2751
