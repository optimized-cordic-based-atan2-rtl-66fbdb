// tb_atan2_cordic: end-to-end test of the atan2 operator at its default
// parameters (W = 16, fully pipelined, 17 cycles of latency).
// Directed vectors, all small vectors and random vectors are streamed through
// the operator with random idle cycles; every result is checked against a
// floating-point atan2 to within one LSB, and every latency against 17
// cycles (see atan2_tb_harness). The test also checks that no result appears
// while the operator is held in reset.
module tb_atan2_cordic;
  localparam int W   = 16;
  localparam int CYC = 17;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid, out_valid, done;
  logic [W-1:0] x_in, y_in, z_out;
  int           checks, failures, rchecks, rfail;

  always #5 clk = ~clk;

  atan2_cordic dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in),
    .out_valid(out_valid), .z_out(z_out)
  );

  atan2_tb_harness #(.W(W), .CYC(CYC), .NRAND(200000), .SMALL(20), .SEED(7)) u_h (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in),
    .out_valid(out_valid), .z_out(z_out), .done(done),
    .checks(checks), .failures(failures)
  );

  initial begin
    rchecks = 0; rfail = 0;
    repeat (3) @(negedge clk);
    rchecks++;
    if (out_valid) rfail++;
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + rchecks, failures + rfail);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + rchecks, failures + rfail + 1);
    $finish;
  end
endmodule
