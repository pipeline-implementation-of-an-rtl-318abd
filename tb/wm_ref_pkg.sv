// wm_ref_pkg: reference model of the watermark embedder for the testbenches,
// written from the rules (set membership, bit-plane numbers) rather than
// from the RTL structure.
package wm_ref_pkg;
  // Smooth (0) or congested (1) from the number of ones in the MSB plane.
  function automatic bit ref_is_t2(int unsigned ones);
    return (ones == 4 || ones == 5 || ones == 6);
  endfunction

  // Embed one watermark bit into an 8-bit pixel. Planes counted 1..8 from
  // the LSB: plane p has weight 2**(p-1).
  function automatic logic [7:0] ref_embed(logic [7:0] pix, bit t2, bit w, bit enhanced);
    int unsigned main_plane, val;
    main_plane = t2 ? 5 : 3;
    val = pix;
    val = w ? (val | (1 << (main_plane-1))) : (val & ~(1 << (main_plane-1)));
    if (enhanced)
      val = w ? (val & ~(1 << (main_plane-2))) : (val | (1 << (main_plane-2)));
    return val[7:0];
  endfunction
endpackage
