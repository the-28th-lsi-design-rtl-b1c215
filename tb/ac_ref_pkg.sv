// ac_ref_pkg: behavioural reference of the angle completion decoder for the
// testbenches: fully connected layer, then the stride-2 3x3 transposed
// convolution by scattering, cells in row-major order, saturating adds.
package ac_ref_pkg;
  import ac_pkg::*;

  function automatic fix_t ref_cell(logic [31:0] z, int c);
    logic [31:0] w;
    longint s;
    w = ac_w(c);
    s = longint'(fxmul(fix_t'(z[15:0]), fix_t'(w[15:0])))
      + longint'(fxmul(fix_t'(z[31:16]), fix_t'(w[31:16])))
      + longint'(ac_b(c));
    return sat16(s);
  endfunction

  // scatter a 16x16 map into a 32x32 image, pixel (r,c) at bits 16*(32r+c)
  function automatic logic [IMG_BITS-1:0] ref_scatter(fix_t cells [N_CELLS],
                                                      logic [KS*KS*DW-1:0] k);
    fix_t img [OUT_DIM][OUT_DIM];
    logic [IMG_BITS-1:0] bits;
    for (int r = 0; r < OUT_DIM; r++)
      for (int c = 0; c < OUT_DIM; c++) img[r][c] = '0;
    for (int n = 0; n < N_CELLS; n++)
      for (int dy = 0; dy < KS; dy++)
        for (int dx = 0; dx < KS; dx++) begin
          int r, c;
          r = 2 * (n / IN_DIM) + dy;
          c = 2 * (n % IN_DIM) + dx;
          if (r < OUT_DIM && c < OUT_DIM)
            img[r][c] = sat16(longint'(img[r][c])
                        + longint'(fxmul(cells[n], fix_t'(k[DW*(KS*dy+dx) +: DW]))));
        end
    for (int r = 0; r < OUT_DIM; r++)
      for (int c = 0; c < OUT_DIM; c++) bits[DW*(OUT_DIM*r + c) +: DW] = img[r][c];
    return bits;
  endfunction

  function automatic logic [IMG_BITS-1:0] ref_image(logic [31:0] z);
    fix_t cells [N_CELLS];
    for (int n = 0; n < N_CELLS; n++) cells[n] = ref_cell(z, n);
    return ref_scatter(cells, ac_k());
  endfunction
endpackage
