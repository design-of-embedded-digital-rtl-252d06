39c82a44
39dd36e5
39f47a1f
3a0717c2
3a154c72
3a24ff7e
3a365916
3a4985a2
3a5eb636
3a76210a
3a880105
3a964db5
3aa61b29
3ab791cb
3acade43
3ae031e6
3af7c337
3b08e737
3b174b09
3b2731d0
3b38c426
3b4c2edf
3b61a383
3b7958c6
3b89c588
3b983e8d
3ba83c46
3bb9e760
3bcd6cc1
3be2fdfa
3bfad1c0
3c0a923a
3c191c5c
3c292c05
3c3ae9c2
3c4e8247
3c6426e3
3c7c0dec
3c8b39a4
3c99cc79
3ca9e3ca
3cbba798
3ccf43e8
3ce4e927
3cfccc91
3d0b9453
3d1a1ed0
3d2a2900
3d3bd989
3d4f5ac1
3d64db02
3d7c8cf9
3d8b53fe
3d99b434
3da987fd
3dbaf315
3dce1c45
3de32d8e
3dfa5453
3e09e0bf
3e17d4d0
3e27227f
3e37e7d3
3e4a44b1
3e5e5acb
3e744d8e
3e8620f7
3e932f1a
3ea164d1
3eb0d605
3ec196a1
3ed3ba3a
3ee753a2
3efc746a
3f099622
3f15c42b
3f22c934
3f30a801
3f3f60bb
3f4ef063
3f5f5045
3f70756a
3f812805
3f8a6583
3f93e5bd
3f9d9837
3fa76956
3fb14262
3fbb09ac
3fc4a2d8
3fcdef47
3fd6ceb0
3fdf1fde
3fe6c18d
3fed9369
3ff37716
3ff8513d
3ffc0a93
3ffe90bd
3fffd70f
3fffd70f
3ffe90bd
3ffc0a93
3ff8513d
3ff37716
3fed9369
3fe6c18d
3fdf1fde
3fd6ceb0
3fcdef47
3fc4a2d8
3fbb09ac
3fb14262
3fa76956
3f9d9837
3f93e5bd
3f8a6583
3f812805
3f70756a
3f5f5045
3f4ef063
3f3f60bb
3f30a801
3f22c934
3f15c42b
3f099622
3efc746a
3ee753a2
3ed3ba3a
3ec196a1
3eb0d605
3ea164d1
3e932f1a
3e8620f7
3e744d8e
3e5e5acb
3e4a44b1
3e37e7d3
3e27227f
3e17d4d0
3e09e0bf
3dfa5453
3de32d8e
3dce1c45
3dbaf315
3da987fd
3d99b434
3d8b53fe
3d7c8cf9
3d64db02
3d4f5ac1
3d3bd989
3d2a2900
3d1a1ed0
3d0b9453
3cfccc91
3ce4e927
3ccf43e8
3cbba798
3ca9e3ca
3c99cc79
3c8b39a4
3c7c0dec
3c6426e3
3c4e8247
3c3ae9c2
3c292c05
3c191c5c
3c0a923a
3bfad1c0
3be2fdfa
3bcd6cc1
3bb9e760
3ba83c46
3b983e8d
3b89c588
3b7958c6
3b61a383
3b4c2edf
3b38c426
3b2731d0
3b174b09
3b08e737
3af7c337
3ae031e6
3acade43
3ab791cb
3aa61b29
3a964db5
3a880105
3a76210a
3a5eb636
3a4985a2
3a365916
3a24ff7e
3a154c72
3a0717c2
39f47a1f
39dd36e5
39c82a44
