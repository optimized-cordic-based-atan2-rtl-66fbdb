// tb_atan2_prerot: checks the quarter-turn pre-rotation. For the extreme
// inputs and for random ones it verifies the direction bit (set for negative
// y), that the rotated vector is (|y|, x) or (|y|, -x) as appropriate,
// and that it lies in the right half plane.
module tb_atan2_prerot;
  localparam int W  = 16;

  logic signed [W-1:0]    x_i, y_i;
  logic                   dir;
  logic signed [W:0]      x_o;
  logic signed [W:0]      y_o;
  int checks = 0, failures = 0;

  atan2_prerot #(.W(W)) dut (.*);

  task automatic try(input int x, input int y);
    longint ex, ey;
    x_i = W'(x);
    y_i = W'(y);
    #1;
    // rotate by -pi/2 when y >= 0, by +pi/2 when y < 0
    if (y >= 0) begin ex = longint'(y);  ey = -longint'(x); end
    else        begin ex = -longint'(y); ey = longint'(x);  end
    checks += 3;
    if (dir !== (y < 0)) failures++;
    if (longint'(x_o) != ex) failures++;
    if (longint'(y_o) != ey) failures++;
    checks++;
    if (x_o < 0) failures++;
    if (failures > 0 && failures < 5)
      $display("ERROR: (%0d,%0d) -> dir %0d x %0d y %0d", x, y, dir, x_o, y_o);
  endtask

  initial begin
    int lo, hi;
    lo = -(1 << (W - 1));
    hi = (1 << (W - 1)) - 1;
    try(lo, lo); try(lo, hi); try(hi, lo); try(hi, hi);
    try(0, 0); try(1, 0); try(0, 1); try(0, -1); try(-1, 0); try(lo, 0); try(0, lo);
    repeat (20000) try(int'($signed(W'($urandom))), int'($signed(W'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
