40440831
404c0831
40521cac
40566666
405ab021
405d4fdf
405e5604
405f5c29
4060624e
40616873
40623d71
4062e148
4063851f
406428f6
4064cccd
406570a4
4066147b
4066b852
40675c29
40680000
4068a3d7
406947ae
4069eb85
406a8f5c
406b3333
406bd70a
406c7ae1
406d1eb8
406dc28f
406e6666
406ed917
406f1aa0
406f5c29
406f9db2
406fdf3b
40701062
40703127
407051ec
407072b0
40709375
4070b439
4070d4fe
4070f5c3
40711687
4071374c
40715810
407178d5
4071999a
4071ba5e
4071db23
40720c4a
40724dd3
40728f5c
4072d0e5
4073126f
407353f8
40739581
4073d70a
40741893
40745a1d
4074ac08
40750e56
407570a4
4075d2f2
4076353f
4076978d
4076f9db
40775c29
4077be77
407820c5
40789375
40791687
4079999a
407a1cac
407a9fbe
407b3333
407bd70a
407c7ae1
407d1eb8
407dc28f
407e5604
407ed917
407f5c29
407fdf3b
40803127
40807ae1
4080cccd
40811eb8
408170a4
4081c28f
40821cac
40827efa
4082e148
40834396
4083a5e3
40841893
40849ba6
40851eb8
4085a1cb
408624dd
