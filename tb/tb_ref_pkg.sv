// tb_ref_pkg: reference models for the testbenches, written from the
// algorithm rather than from the RTL. Images are arrays of one entry per
// pixel in raster order; neighbours wrap around modulo the pixel count.
package tb_ref_pkg;

  // raster index of the pixel dr rows and dc columns from p
  function automatic int nbr(input int p, input int dr, input int dc, input int M, input int N);
    int t = p + dr * N + dc;
    t = t % (M * N);
    if (t < 0) t += M * N;
    return t;
  endfunction

  // Sobel edges, 1 = edge
  function automatic void ref_edges(input int M, input int N, input bit img[], input int thresh,
                                    ref bit vedge[], ref bit hedge[]);
    vedge = new[M*N];
    hedge = new[M*N];
    for (int p = 0; p < M*N; p++) begin
      int gx, gy;
      // vertical mask  [1 0 -1; 2 0 -2; 1 0 -1]
      gx = img[nbr(p,-1,-1,M,N)] + 2*img[nbr(p,0,-1,M,N)] + img[nbr(p,1,-1,M,N)]
         - img[nbr(p,-1,1,M,N)]  - 2*img[nbr(p,0,1,M,N)]  - img[nbr(p,1,1,M,N)];
      // horizontal mask [1 2 1; 0 0 0; -1 -2 -1]
      gy = img[nbr(p,-1,-1,M,N)] + 2*img[nbr(p,-1,0,M,N)] + img[nbr(p,-1,1,M,N)]
         - img[nbr(p,1,-1,M,N)]  - 2*img[nbr(p,1,0,M,N)]  - img[nbr(p,1,1,M,N)];
      vedge[p] = (gx > thresh);
      hedge[p] = (gy > thresh);
    end
  endfunction

  // true when the five pixels along (dr,dc) through p are all set
  function automatic bit line5(input bit e[], input int p, input int dr, input int dc,
                               input int M, input int N);
    for (int s = -2; s <= 2; s++)
      if (!e[nbr(p, s*dr, s*dc, M, N)]) return 0;
    return 1;
  endfunction

  // direction codes: 1 "\", 2 "/", 3 "-", 4 "|", 5 none
  function automatic void ref_dirs(input int M, input int N, input bit vedge[], input bit hedge[],
                                   ref byte vdir[], ref byte hdir[]);
    vdir = new[M*N];
    hdir = new[M*N];
    for (int p = 0; p < M*N; p++) begin
      if (line5(vedge,p,1,1,M,N))       vdir[p] = 1;
      else if (line5(vedge,p,-1,1,M,N)) vdir[p] = 2;
      else if (line5(vedge,p,1,0,M,N))  vdir[p] = 4;
      else                              vdir[p] = 5;
      if (line5(hedge,p,1,1,M,N))       hdir[p] = 1;
      else if (line5(hedge,p,-1,1,M,N)) hdir[p] = 2;
      else if (line5(hedge,p,0,1,M,N))  hdir[p] = 3;
      else                              hdir[p] = 5;
    end
  endfunction

  // stored byte of a one-bit image (pixel 8a in bit 7), optionally inverted
  function automatic byte pack8(input bit img[], input int a, input bit inv);
    byte b = 0;
    for (int i = 0; i < 8; i++) b[7-i] = img[8*a+i] ^ inv;
    return b;
  endfunction

  // synthetic fingerprint: diagonal ridges with a period of 6 pixels, their
  // slope flipping between the left and right halves, plus sparse noise
  function automatic void make_print(input int M, input int N, input int seed, ref bit img[]);
    img = new[M*N];
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++) begin
        int d = (c < N/2) ? (r + c) : (r - c + 4*N);
        img[r*N+c] = ((d % 6) < 3);
        if (((r * 37 + c * 11 + seed) % 53) == 0) img[r*N+c] = !img[r*N+c];
      end
  endfunction
endpackage
