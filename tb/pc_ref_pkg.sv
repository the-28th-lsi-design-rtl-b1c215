// pc_ref_pkg: reference model of the point cloud decoder for the
// testbenches, written with plain integer arithmetic.
package pc_ref_pkg;
  import pc_pkg::*;
  // output dimension d for latent vector z (packed, dimension k in [16k+15:16k])
  function automatic logic [15:0] ref_dim(logic [LAT_BITS-1:0] z, int d);
    int s = 0;
    for (int k = 0; k < N_LAT; k++) begin
      int pr;
      pr = int'($signed(z[16*k +: 16])) * int'(pc_weight(d, k));
      s += int'($signed(16'(pr >>> FRAC)));
    end
    s += int'(pc_bias(d));
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return 16'(s);
  endfunction
endpackage
