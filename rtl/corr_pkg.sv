// corr_pkg: types and constants shared by the correlator.
//
// A sample is a 2-bit, 4-level code {sign, magnitude}: sign 1 is positive,
// magnitude 1 is a high level (beyond the sampler threshold). The correlator
// runs at 32 MHz and carries two samples per clock (even, odd), so every
// station signal is a 64 Ms/s stream, four bits per clock.
//
// The product is the "reduced" four-level product of the correlator chip:
// high*high counts 3, high*low counts 1, low*low counts 0, with the sign the
// exclusive-or of the two signs. The table itself is this design's choice (no
// table is printed); it is offset by +3 so every accumulator is a plain
// up-counter that adds 0..6 per sample. Over n samples the offset is 3n and a
// reader subtracts it.
package corr_pkg;

  typedef logic [1:0] sample_t;          // {sign, magnitude}
  typedef sample_t    pair_t [2];        // [0] even sample, [1] odd sample

  localparam int unsigned PROD_OFFSET = 3;
  localparam int unsigned PROD_W      = 3;

  // Offset product: 3 + signed reduced product, range 0..6.
  function automatic logic [PROD_W-1:0] rprod(sample_t a, sample_t b);
    logic neg;
    neg = a[1] ^ b[1];
    unique case ({a[0], b[0]})
      2'b11:   rprod = neg ? 3'd0 : 3'd6;
      2'b10,
      2'b01:   rprod = neg ? 3'd2 : 3'd4;
      default: rprod = PROD_W'(PROD_OFFSET);
    endcase
  endfunction

endpackage
