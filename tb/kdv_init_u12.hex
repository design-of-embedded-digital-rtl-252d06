3a5b080b
3b90d3d7
3cbeca40
3df65173
3f0f928a
3fd83c54
3fd83c54
3f0f928a
3df65173
3cbeca40
3b90d3d7
3a5b080b
