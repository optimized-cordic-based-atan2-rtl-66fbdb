// tb_atan2_configs: runs the atan2 operator in every configuration of the
// published implementation results side by side: W = 16 with 1, 2, 3, 4, 5,
// 9 and 17 pipeline stages, W = 24 with 1, 2, 3, 4, 5, 13 and 25 stages,
// both widths again with 6-direction tables (the grouping suited to devices
// with 6-input LUTs in front of the carry chain), and the 12-bit operator of
// the schematic. Each instance gets its own stimulus/scoreboard harness,
// which checks last-bit accuracy, latency and result order.
// Word lengths per width: W=12: GX 10, GY 12, ZG 4, XF 5; W=16: the
// operator defaults; W=24: GX 16, GY 24, ZG 5, XF 9.
module tb_atan2_configs;
  localparam int NC = 17;
  localparam int CW  [NC] = '{16, 16, 16, 16, 16, 16, 16, 24, 24, 24, 24, 24, 24, 24, 16, 24, 12};
  localparam int CC  [NC] = '{ 1,  2,  3,  4,  5,  9, 17,  1,  2,  3,  4,  5, 13, 25, 17, 25,  1};
  localparam int CN0 [NC] = '{ 6,  6,  6,  6,  6,  6,  6,  6,  6,  6,  6,  6,  6,  6,  6,  6,  6};
  localparam int CN  [NC] = '{ 5,  5,  5,  5,  5,  5,  5,  5,  5,  5,  5,  5,  5,  5,  6,  6,  5};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   chk [NC];
  int   fl  [NC];
  logic dn  [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int W   = CW[c];
    localparam int GX  = (W == 24) ? 16 : 10;
    localparam int GY  = (W == 24) ? 24 : (W == 16) ? 15 : 12;
    localparam int ZG  = (W == 24) ? 5 : 4;
    localparam int XF  = (W == 24) ? 9 : (W == 16) ? 6 : 5;

    logic         iv, ov;
    logic [W-1:0] x, y, z;

    atan2_cordic #(
      .W(W), .GX(GX), .GY(GY), .ZG(ZG), .XF(XF), .N0(CN0[c]), .N(CN[c]), .CYC(CC[c])
    ) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(iv), .x_in(x), .y_in(y),
      .out_valid(ov), .z_out(z)
    );

    atan2_tb_harness #(.W(W), .CYC(CC[c]), .NRAND(20000), .SMALL(12), .SEED(c + 11)) u_h (
      .clk(clk), .rst_n(rst_n), .in_valid(iv), .x_in(x), .y_in(y),
      .out_valid(ov), .z_out(z), .done(dn[c]), .checks(chk[c]), .failures(fl[c])
    );
  end

  initial begin
    int checks, failures;
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int c = 0; c < NC; c++) all &= dn[c];
    end while (!all);
    checks = 0; failures = 0;
    for (int c = 0; c < NC; c++) begin
      checks += chk[c];
      failures += fl[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (500000) @(posedge clk);
    checks = 0; failures = 1;
    for (int c = 0; c < NC; c++) begin
      checks += chk[c];
      failures += fl[c];
    end
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
