// tb_atan2_w12_exhaustive: feeds every one of the 2^24 - 1 non-zero input
// vectors through the 12-bit operator (three tables of 6, 5 and 2
// directions, 13 pipeline stages), one per clock cycle, and checks each
// result against a floating-point atan2 to within one LSB. Inputs are sent
// in counter order; each result must appear exactly 13 cycles after its
// input. Reports the largest error seen.
module tb_atan2_w12_exhaustive;
  localparam int  W   = 12;
  localparam int  CYC = W + 1;
  localparam real PI  = 3.14159265358979323846;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid, out_valid;
  logic [W-1:0] x_in, y_in, z_out;
  int           checks = 0, failures = 0;
  real          max_err = 0.0;

  always #5 clk = ~clk;

  atan2_cordic #(
    .W(W), .GX(10), .GY(12), .ZG(4), .XF(5), .N0(6), .N(5), .CYC(CYC)
  ) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in),
    .out_valid(out_valid), .z_out(z_out)
  );

  // inputs of the operations in flight, indexed by issue cycle modulo 32
  logic [2*W-1:0] hist [32];
  logic [31:0]    cnt = '0;
  logic [2*W:0]   nxt;
  bit             sending;

  always_ff @(posedge clk) cnt <= cnt + 1;

  always @(negedge clk) begin
    if (rst_n && sending) begin
      in_valid <= 1'b1;
      {y_in, x_in} <= nxt[2*W-1:0];
      hist[cnt[4:0]] = nxt[2*W-1:0];
      nxt = nxt + 1;
      if (nxt[2*W]) sending = 1'b0;
    end else begin
      in_valid <= 1'b0;
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      logic [2*W-1:0] v;
      int  xi, yi;
      real r, e;
      v  = hist[5'(cnt - CYC)];
      xi = int'($signed(v[W-1:0]));
      yi = int'($signed(v[2*W-1:W]));
      r  = $atan2(real'(yi), real'(xi)) / (2.0 * PI);
      if (r < 0.0) r = r + 1.0;
      e  = real'(z_out) - r * (2.0 ** W);
      if (e > 2.0 ** (W - 1)) e = e - 2.0 ** W;
      if (e < -(2.0 ** (W - 1))) e = e + 2.0 ** W;
      if (e < 0.0) e = -e;
      checks++;
      if (e > max_err) max_err = e;
      if (e > 1.0 + 1e-9) begin
        failures++;
        if (failures < 10)
          $display("ERROR: atan2(%0d, %0d) = %0d, error %f LSB", yi, xi, z_out, e);
      end
    end
  end

  initial begin
    nxt = 1;  // (0, 0) is skipped
    sending = 1'b1;
    in_valid = 1'b0; x_in = '0; y_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (!sending);
    repeat (CYC + 3) @(negedge clk);
    checks++;
    if (checks != (1 << (2 * W))) begin
      failures++;
      $display("ERROR: %0d results for %0d inputs", checks - 1, (1 << (2 * W)) - 1);
    end
    $display("W=%0d exhaustive: %0d results, max error %f LSB", W, checks - 1, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (17000000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
