0000 011e 023c 0359 0477 0594 06b1 07cd 08e8 0a03 0b1d 0c36 0d4e 0e66 0f7c 1090 11a4 12b6 13c7 14d6 15e4 16f0 17fa 1902 1a08 1b0c 1c0e 1d0e 1e0c 1f07 2000 20f6 21ea 22db 23ca 24b5 259e 2684 2767 2847 2923 29fd 2ad3 2ba6 2c75 2d41 2e0a 2ece 2f90 304d 3107 31bd 326f 331d 33c7 346d 350f 35ad 3646 36dc 376d 37fa 3882 3906 3986 3a01 3a78 3aea 3b57 3bc0 3c24 3c83 3cde 3d34 3d85 3dd2 3e19 3e5c 3e9a 3ed3 3f07 3f36 3f61 3f86 3fa6 3fc2 3fd8 3fea 3ff6 3ffe
