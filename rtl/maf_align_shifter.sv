// maf_align_shifter: alignment of the addend mantissa C. C is first positioned at the top
// of the window, 2 bits left of the product's MSB (double: bits 160:108; single: lane 2 at
// 148:125 and lane 1 at 73:50), then right-shifted by the clamped exponent difference.
// The right shifter has log2 stages (shift by 1, 2, ..., 128). Each stage is split by
// precision-mode multiplexers into three slices: the most significant slice (bits 160:75)
// is controlled by shamt[i] in double mode and by the lane-2 shift shamt[7+i] in single
// mode; the centre slice (bits 74:74-2^i+1) is controlled by shamt[i] but takes its
// shifted-in bits from above only in double mode (zeros in single mode, so lane 2 never
// spills into lane 1); the least significant slice is an ordinary shifter stage. The
// last stage (128) is disabled in single mode. Bits shifted out at the bottom of each
// lane are gathered into the partial sticky st1 (bit 0 double or lane 1, bit 1 lane 2),
// computed in parallel from C and the shift amount. Combinational.
module maf_align_shifter
  import maf_pkg::*;
(
  input  logic           dbl,
  input  logic [DMW-1:0] fc,
  input  logic [13:0]    shamt,
  output logic [WW-1:0]  c_al,
  output logic [1:0]     st1
);
  localparam int NST = 8;
  logic [WW-1:0] c_pos;

  assign c_pos = dbl ? {fc, 108'b0}
                      : {12'b0, fc[47:24], 50'b0, 1'b0, fc[23:0], 50'b0};

  for (genvar i = 0; i < NST; i++) begin : g_stage
    localparam int K = 1 << i;
    logic ctl_hi, ctl_lo;
    logic [WW-1:0] din, q;
    if (i == 0) begin : g_first
      assign din = c_pos;
    end else begin : g_next
      assign din = g_stage[i-1].q;
    end
    assign ctl_hi = dbl ? shamt[i] : ((i < 7) ? shamt[7+i] : 1'b0);
    assign ctl_lo = (i == 7) ? (dbl & shamt[7]) : shamt[i];
    always_comb begin
      for (int j = 0; j < WW; j++) begin
        logic src;
        if (j + K > WW - 1)
          src = 1'b0;
        else if (j < L2LO && j + K >= L2LO)
          src = dbl & din[j+K];          // centre slice: lane boundary mux
        else
          src = din[j+K];
        if (j >= L2LO)
          q[j] = ctl_hi ? src : din[j];
        else
          q[j] = ctl_lo ? src : din[j];
      end
    end
  end

  assign c_al = g_stage[NST-1].q;

  // partial sticky: OR of the C bits that fall below the lane's bit 0
  always_comb begin
    logic [7:0] sh0, sh1;
    sh0 = dbl ? shamt[7:0] : {1'b0, shamt[6:0]};
    sh1 = {1'b0, shamt[13:7]};
    st1 = '0;
    for (int k = 0; k < DMW; k++) begin
      if (dbl) begin
        if (k + 108 < int'(sh0)) st1[0] |= fc[k];
      end else if (k < SMW) begin
        if (k + 50 < int'(sh0)) st1[0] |= fc[k];
        if (k + 50 < int'(sh1)) st1[1] |= fc[k+SMW];
      end
    end
  end
endmodule
