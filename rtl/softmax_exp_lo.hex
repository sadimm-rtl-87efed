3f800000
3f7f0080
3f7e01ff
3f7d047c
3f7c07f5
3f7b0c6b
3f7a11dc
3f791847
3f781fab
3f772808
3f76315b
3f753ba5
3f7446e3
3f735316
3f72603d
3f716e56
3f707d60
3f6f8d5b
3f6e9e45
3f6db01e
3f6cc2e4
3f6bd698
3f6aeb37
3f6a00c1
3f691735
3f682e92
3f6746d8
3f666004
3f657a17
3f649510
3f63b0ed
3f62cdae
3f61eb51
3f6109d7
3f60293d
3f5f4984
3f5e6aaa
3f5d8cae
3f5caf90
3f5bd34f
3f5af7e9
3f5a1d5f
3f5943ae
3f586ad7
3f5792d8
3f56bbb1
3f55e561
3f550fe6
3f543b41
3f53676f
3f529471
3f51c246
3f50f0ed
3f502064
3f4f50ac
3f4e81c2
3f4db3a8
3f4ce65b
3f4c19db
3f4b4e27
3f4a833e
3f49b920
3f48efcc
3f482740
