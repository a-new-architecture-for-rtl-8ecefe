// maf_norm_shifter: two-step normalization of the mantissa magnitude.
// Step 1 is a constant left shift (53 bits double, 24 bits single) taken when the
// exponent difference says that the leading one can only be in the low part of the
// window (lowwin). Step 2 is a variable left shifter (108-bit reach double, 50-bit single
// lanes) driven by the leading-zero anticipator, split by precision multiplexers like the
// alignment shifter so that no bit crosses from lane 1 into lane 2. The anticipated count
// may be off by one, so the variable shifter shifts by count-2 (never negative) and a
// final 4-way correction stage looks at the top three bits of each lane and adds the
// remaining 0 to 3 positions. The leading one ends at bit 160 (double), 73 (lane 1) or
// 148 (lane 2). tsh0/tsh1 are the total left shifts, for the exponent. A zero magnitude
// leaves the correction at 3 and is caught by the zero flag. Combinational.
module maf_norm_shifter
  import maf_pkg::*;
(
  input  logic          dbl,
  input  logic [WW-1:0] mag,
  input  logic [1:0]    lowwin,
  input  logic [11:0]   lz,
  output logic [WW-1:0] norm,
  output logic [7:0]    tsh0,
  output logic [6:0]    tsh1
);
  localparam int NST = 7;
  logic [WW-1:0] c1;
  logic [6:0]    s0;
  logic [5:0]    s1;
  logic [1:0]    k0, k1;

  // step 1: constant shifter
  always_comb begin
    if (dbl)
      c1 = lowwin[0] ? (mag << 53) : mag;
    else begin
      c1 = '0;
      c1[LW-1:0]           = lowwin[0] ? (mag[LW-1:0] << 24) : mag[LW-1:0];
      c1[L2LO+LW-1:L2LO]   = lowwin[1] ? (mag[L2LO+LW-1:L2LO] << 24) : mag[L2LO+LW-1:L2LO];
    end
  end

  // variable shift amounts, two short of the anticipated count
  always_comb begin
    s0 = dbl ? ((lz[6:0] > 7'd2) ? lz[6:0] - 7'd2 : 7'd0)
             : ((lz[5:0] > 6'd2) ? {1'b0, lz[5:0] - 6'd2} : 7'd0);
    s1 = (lz[11:6] > 6'd2) ? lz[11:6] - 6'd2 : 6'd0;
  end

  // step 2: segmented variable left shifter
  for (genvar i = 0; i < NST; i++) begin : g_stage
    localparam int K = 1 << i;
    logic ctl_hi;
    logic [WW-1:0] din, q;
    if (i == 0) begin : g_first
      assign din = c1;
    end else begin : g_next
      assign din = g_stage[i-1].q;
    end
    if (i < 6) begin : g_ctl
      assign ctl_hi = dbl ? s0[i] : s1[i];
    end else begin : g_ctl6
      assign ctl_hi = dbl & s0[i];
    end
    always_comb begin
      for (int j = 0; j < WW; j++) begin
        logic src;
        if (j - K < 0)
          src = 1'b0;
        else if (j >= L2LO && j - K < L2LO)
          src = dbl & din[j-K];          // lane boundary mux
        else
          src = din[j-K];
        if (j >= L2LO)
          q[j] = ctl_hi ? src : din[j];
        else
          q[j] = s0[i] ? src : din[j];
      end
    end
  end

  // step 3: position correction
  function automatic logic [1:0] corr(input logic [2:0] top);
    if (top[2])      return 2'd0;
    else if (top[1]) return 2'd1;
    else if (top[0]) return 2'd2;
    else             return 2'd3;
  endfunction

  always_comb begin
    logic [WW-1:0] v;
    v = g_stage[NST-1].q;
    if (dbl) begin
      k0 = corr(v[160:158]);
      k1 = 2'd0;
      norm = v << k0;
      tsh0 = (lowwin[0] ? 8'd53 : 8'd0) + {1'b0, s0} + {6'b0, k0};
      tsh1 = '0;
    end else begin
      k0 = corr(v[73:71]);
      k1 = corr(v[148:146]);
      norm = '0;
      norm[LW-1:0]         = v[LW-1:0] << k0;
      norm[L2LO+LW-1:L2LO] = v[L2LO+LW-1:L2LO] << k1;
      tsh0 = (lowwin[0] ? 8'd24 : 8'd0) + {1'b0, s0} + {6'b0, k0};
      tsh1 = (lowwin[1] ? 7'd24 : 7'd0) + {1'b0, s1} + {5'b0, k1};
    end
  end
endmodule
