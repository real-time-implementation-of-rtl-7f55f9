// unit 0 (scale 2)
06071530 091CA6A3 0C90D860 0FCEF973 12249FF2 12FED916 12249FF2 0FCEF973 0C90D860
091CA6A3 0DC63A25 12FED916 17E5BD57 1B6D3275 1CB714CD 1B6D3275 17E5BD57 12FED916
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
12FED916 1CB714CD 27998497 31D1931F 392D004A 3BDCB4DC 392D004A 31D1931F 27998497
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
// unit 1 (scale 3)
06071530 091CA6A3 0C90D860 0FCEF973 12249FF2 12FED916 12249FF2 0FCEF973 0C90D860
091CA6A3 0DC63A25 12FED916 17E5BD57 1B6D3275 1CB714CD 1B6D3275 17E5BD57 12FED916
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
12FED916 1CB714CD 27998497 31D1931F 392D004A 3BDCB4DC 392D004A 31D1931F 27998497
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
// unit 2 (scale 4)
06071530 091CA6A3 0C90D860 0FCEF973 12249FF2 12FED916 12249FF2 0FCEF973 0C90D860
091CA6A3 0DC63A25 12FED916 17E5BD57 1B6D3275 1CB714CD 1B6D3275 17E5BD57 12FED916
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
12FED916 1CB714CD 27998497 31D1931F 392D004A 3BDCB4DC 392D004A 31D1931F 27998497
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
// unit 3 (scale 5)
06071530 091CA6A3 0C90D860 0FCEF973 12249FF2 12FED916 12249FF2 0FCEF973 0C90D860
091CA6A3 0DC63A25 12FED916 17E5BD57 1B6D3275 1CB714CD 1B6D3275 17E5BD57 12FED916
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
12FED916 1CB714CD 27998497 31D1931F 392D004A 3BDCB4DC 392D004A 31D1931F 27998497
12249FF2 1B6D3275 25D2973C 2F95401B 369C282F 392D004A 369C282F 2F95401B 25D2973C
0FCEF973 17E5BD57 20F4AD33 2975D1C5 2F95401B 31D1931F 2F95401B 2975D1C5 20F4AD33
0C90D860 12FED916 1A321DDF 20F4AD33 25D2973C 27998497 25D2973C 20F4AD33 1A321DDF
