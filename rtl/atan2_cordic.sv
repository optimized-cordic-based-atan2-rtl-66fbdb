// atan2_cordic: W-bit atan2(y, x) operator built on the CORDIC vectoring
// algorithm, with a z path made of look-up tables instead of one adder per
// iteration.
//
// How it works. A quarter-turn pre-rotation (atan2_prerot) moves the vector
// into the right half plane, then W-1 CORDIC iterations (atan2_xy_stage)
// drive y towards zero. Each step only yields a direction bit, the sign of
// its y value; the last direction is the sign of the final y, for which no
// adder is needed. The W+1 direction bits are consumed in groups: the first
// group of N0 bits addresses a plain table, and each following group of up to
// N bits addresses a table whose entry is added to the running angle
// (atan2_zlut). The table entries are the sums of all +-atan(2^-i) the group
// can produce, so a group of N iterations costs one adder instead of N.
// The first table also carries the rounding constant, so the result is the
// top W bits of the final sum.
//
// Number format. x_in and y_in are W-bit two's complement integers. z_out is
// the angle as an unsigned W-bit fraction of a full turn, in [0, 1): 0 is the
// positive x axis, 2^(W-2) is +pi/2, 2^(W-1) is pi, and negative angles wrap
// to the upper half. With the default word lengths the result is within one
// LSB of the exact angle for every input except (0, 0), whose angle is not
// defined (the operator returns the pre-rotation angle plus whatever the
// iterations produce from a zero vector).
//
// Pipelining. The W+1 steps (pre-rotation, iterations, final sign) are
// spread evenly over CYC register stages; the last register is the output
// register, so CYC = 1 is a combinational operator with registered outputs
// and CYC = W+1 puts a register after every step. Latency is CYC clock
// cycles and one operation can be started every cycle. The z-path additions
// are placed as late as possible (see atan2_pkg), so z is registered in only
// a few stages while the direction bits travel as single-bit delay lines,
// which an FPGA packs into shift-register LUTs.
//
// Interface: in_valid qualifies x_in/y_in; out_valid follows CYC cycles
// later with z_out. rst_n (asynchronous, active low) clears only the valid
// pipeline; the data registers are not reset.
//
// Parameters: W result and input width; GX, GY fraction bits carried below
// the input LSB on the x and y paths; ZG guard bits on the z path; XF number
// of iterations that still update x (x is frozen afterwards); N0, N table
// input counts of the first and of the following groups; CYC pipeline depth.
//
// The method is that of V. Torres Carot, J. Valls Coquillat and M. J. Canet
// Subiela, "Optimised CORDIC-based atan2 computation for FPGA
// implementations", Electronics Letters 53(19), 2017. The algorithm, the
// grouping into LUTn tables, the table contents, the rounding constant, the
// frozen x path and the shrinking y path follow it, as do W = 16 and the
// fully pipelined depth of W+1 cycles. The
// default word lengths (GX, GY, ZG, XF) were chosen here so that the result
// is last-bit accurate for every input; the valid/reset handshake and the
// exact register placement are also this design's own.
module atan2_cordic
  import atan2_pkg::*;
#(
  parameter int W   = 16,
  parameter int GX  = 10,
  parameter int GY  = 15,
  parameter int ZG  = 4,
  parameter int XF  = 6,
  parameter int N0  = 6,
  parameter int N   = 5,
  parameter int CYC = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x_in,
  input  logic [W-1:0] y_in,
  output logic         out_valid,
  output logic [W-1:0] z_out
);
  localparam int XW = W + 2 + GX;
  localparam int YW = W + 2 + GY;
  localparam int ZW = W + ZG;
  localparam int NG = num_groups(W, N0, N);

  // width of y after step m (y_m), two's complement
  function automatic int yw_of(input int m);
    return (m <= 2) ? YW : YW + 2 - m;
  endfunction

  // direction bits still needed after step k
  function automatic logic [W:0] dir_keep(input int k);
    logic [W:0] m;
    m = '0;
    for (int b = 0; b <= k && b <= W; b++)
      if (group_step(W, CYC, N0, N, group_of_bit(b, N0, N)) > k) m[b] = 1'b1;
    return m;
  endfunction

  // values after each step (after its register, where it has one);
  // y is kept sign-extended to YW, only the low yw_of(k) bits are used
  logic signed [XW-1:0] x_s [W+1];
  logic signed [YW-1:0] y_s [W+1];
  logic        [W:0]    dv_s[W+1];
  logic        [ZW-1:0] z_s [W+1];
  logic                 v_s [W+1];

  initial begin
    assert (W >= 8 && W <= 60) else $error("W out of range");
    assert (CYC >= 1 && CYC <= W + 1) else $error("CYC must be 1 .. W+1");
    assert (GY >= GX) else $error("GY must not be below GX");
    assert (N0 >= 1 && N >= 1) else $error("table input counts must be positive");
  end

  for (genvar k = 0; k <= W; k++) begin : g_step
    localparam bit        REG  = reg_after_step(W, CYC, k);
    localparam logic [W:0] KEEP = dir_keep(k);
    localparam bit        ZLIVE = (k >= group_step(W, CYC, N0, N, 0));
    // live y bits: only these are registered, the sign-extended rest of yc
    // is unused on purpose
    localparam int        YK   = (k < W) ? yw_of(k) : 1;

    logic signed [XW-1:0] xc;
    logic signed [YW-1:0] yc;
    logic                 dir;
    logic        [W:0]    dvc;
    logic        [ZW-1:0] zch [NG+1];
    logic                 vin;

    // ---------------- x/y path ----------------
    if (k == 0) begin : g_pre
      logic signed [W:0] x0, y0;
      atan2_prerot #(.W(W)) u_prerot (
        .x_i(x_in), .y_i(y_in), .dir(dir), .x_o(x0), .y_o(y0)
      );
      // append the guard bits; one more integer bit for the CORDIC gain
      assign xc  = XW'(x0) <<< GX;
      assign yc  = YW'(y0) <<< GY;
      assign vin = in_valid;
    end else if (k < W) begin : g_iter
      localparam int YI = yw_of(k - 1);
      localparam int YO = yw_of(k);
      logic signed [YO-1:0] yo;
      atan2_xy_stage #(
        .W(W), .GX(GX), .GY(GY), .I(k - 1), .YIW(YI), .YOW(YO),
        .UPDATE_X((k - 1) < XF)
      ) u_stage (
        .x_i(x_s[k-1]), .y_i(y_s[k-1][YI-1:0]), .dir(dir), .x_o(xc), .y_o(yo)
      );
      assign yc  = YW'(yo);
      assign vin = v_s[k-1];
    end else begin : g_last
      // last iteration: only the sign of y is needed, no adder
      assign dir = y_s[k-1][yw_of(k-1)-1];
      assign xc  = '0;
      assign yc  = '0;
      assign vin = v_s[k-1];
    end

    // ---------------- direction bits ----------------
    if (k == 0) begin : g_dv0
      always_comb begin
        dvc    = '0;
        dvc[0] = dir;
      end
    end else begin : g_dvk
      always_comb begin
        dvc    = dv_s[k-1];
        dvc[k] = dir;
      end
    end

    // ---------------- z path: groups finished in this step ----------------
    if (k == 0) begin : g_z0
      assign zch[0] = '0;
    end else begin : g_zk
      assign zch[0] = z_s[k-1];
    end
    for (genvar j = 0; j < NG; j++) begin : g_grp
      localparam int GF = group_first(j, N0, N);
      localparam int GL = group_len(W, j, N0, N);
      if (group_step(W, CYC, N0, N, j) == k) begin : g_add
        atan2_zlut #(
          .W(W), .ZG(ZG), .FIRST_DIR(GF - 1), .LEN(GL),
          .ACCUMULATE(j != 0), .ROUND(j == 0)
        ) u_lut (
          .d(dvc[GF+GL-1:GF]), .z_i(zch[j]), .z_o(zch[j+1])
        );
      end else begin : g_pass
        assign zch[j+1] = zch[j];
      end
    end

    // ---------------- stage boundary ----------------
    if (REG) begin : g_reg
      logic signed [XW-1:0] x_q;
      logic signed [YK-1:0] y_q;
      logic        [W:0]    dv_q;
      logic                 v_q;
      always_ff @(posedge clk) begin
        x_q  <= xc;
        y_q  <= yc[YK-1:0];
        dv_q <= dvc & KEEP;
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) v_q <= 1'b0;
        else        v_q <= vin;
      end
      assign x_s[k]  = x_q;
      assign y_s[k]  = YW'(y_q);
      assign dv_s[k] = dv_q;
      assign v_s[k]  = v_q;
      if (ZLIVE) begin : g_zreg
        logic [ZW-1:0] z_q;
        always_ff @(posedge clk) z_q <= zch[NG];
        assign z_s[k] = z_q;
      end else begin : g_znone
        assign z_s[k] = '0;
      end
    end else begin : g_wire
      assign x_s[k]  = xc;
      assign y_s[k]  = yc;
      assign dv_s[k] = dvc & KEEP;
      assign v_s[k]  = vin;
      assign z_s[k]  = ZLIVE ? zch[NG] : '0;
    end
  end

  assign out_valid = v_s[W];
  assign z_out     = z_s[W][ZW-1 -: W];

endmodule
