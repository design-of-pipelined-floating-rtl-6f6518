// fpa_lod_norm: normalization shifter with an MSB-first leading-one detector.
//
// Normalizes the 25-bit near-path result f_sum[24:0] (bit 24 is the hidden
// bit position, bit 0 the guard bit) by shifting it left until its leading
// one reaches bit 24, and returns the top 24 bits as norm_out together with
// the shift length L[4:0]. The leading-one detector produces the shift
// control bits most significant first: L4 is the NOR of the top 16 bits,
// L3 is the NOR of the 8-bit window that the <<16 stage will bring to the
// top (chosen by L4 with a multiplexer from the unshifted input), L2 the NOR
// of the 4-bit window selected by L4..L3, and so on; bits beyond the input
// count as zero. Each shifter stage (<<16, <<8, <<4, <<2, <<1) can therefore
// start as soon as its own control bit is ready, rather than waiting for the
// whole count. `zero` flags an all-zero input (L is then 31 and norm_out 0).
// Purely combinational.
module fpa_lod_norm (
  input  logic [24:0] f_sum,
  output logic [4:0]  shf_len,
  output logic [23:0] norm_out,
  output logic        zero
);
  // Input with zero padding below bit 0, so a window never reads past it.
  logic [56:0] ext;
  assign ext = {f_sum, 32'd0};

  // MSB-first control bits, each from the original input.
  always_comb begin
    logic [5:0] done;   // shift already decided by the higher control bits
    logic [15:0] win;
    done = '0;
    for (int k = 4; k >= 0; k--) begin
      win = 16'(ext[56 - done -: 16]);      // bits [56-done : 41-done]
      // NOR over the top 2^k bits of the window
      shf_len[k] = ~|(win >> (16 - (1 << k)));
      if (shf_len[k]) done = done + 6'(1 << k);
    end
  end

  // Normalization shifter: five fixed stages controlled by L4..L0.
  logic [24:0] st4, st3, st2, st1, st0;
  assign st4 = shf_len[4] ? {f_sum[8:0], 16'd0} : f_sum;
  assign st3 = shf_len[3] ? {st4[16:0], 8'd0}  : st4;
  assign st2 = shf_len[2] ? {st3[20:0], 4'd0}  : st3;
  assign st1 = shf_len[1] ? {st2[22:0], 2'd0}  : st2;
  assign st0 = shf_len[0] ? {st1[23:0], 1'd0}  : st1;

  assign norm_out = st0[24:1];
  assign zero     = ~|f_sum;

endmodule
