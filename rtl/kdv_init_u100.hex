39d26d40
3a00814b
3a1cf3c1
3a3fb209
3a6a20bd
3a8ef9a4
3aae9ea5
3ad543e8
3b023acb
3b1f0b9d
3b423b7b
3b6d326e
3b90d3d7
3bb0d974
3bd7f098
3c03d39d
3c20f10f
3c4477b4
3c6fce7e
3c9254d9
3cb28d7a
3cd9d234
3d04d3d3
3d21f19d
3d455d42
3d706a6f
3d9257c5
3db20845
3dd86525
3e035f75
3e1f4e9e
3e40e140
3e691651
3e8c8452
3ea8f4bb
3eca7adb
3ef1b212
3f0f928a
3f299d4e
3f470e04
3f67cb0d
3f85bd83
3f98b9d9
3fac5668
3fbfdde4
3fd26eac
3fe308b3
3ff0a4d0
3ffa5348
3fff5c6f
3fff5c6f
3ffa5348
3ff0a4d0
3fe308b3
3fd26eac
3fbfdde4
3fac5668
3f98b9d9
3f85bd83
3f67cb0d
3f470e04
3f299d4e
3f0f928a
3ef1b212
3eca7adb
3ea8f4bb
3e8c8452
3e691651
3e40e140
3e1f4e9e
3e035f75
3dd86525
3db20845
3d9257c5
3d706a6f
3d455d42
3d21f19d
3d04d3d3
3cd9d234
3cb28d7a
3c9254d9
3c6fce7e
3c4477b4
3c20f10f
3c03d39d
3bd7f098
3bb0d974
3b90d3d7
3b6d326e
3b423b7b
3b1f0b9d
3b023acb
3ad543e8
3aae9ea5
3a8ef9a4
3a6a20bd
3a3fb209
3a1cf3c1
3a00814b
39d26d40
