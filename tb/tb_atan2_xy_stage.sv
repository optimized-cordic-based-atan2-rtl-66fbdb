// tb_atan2_xy_stage: checks single CORDIC iterations. Three instances cover
// an early iteration with full y width, a later one whose y output is
// narrowed, and one with a frozen x path. Inputs are random vectors in the
// right half plane whose y respects the bound the narrowed width relies on;
// expected values are computed with 64-bit integer arithmetic
// (y -/+ floor(x*2^(GY-GX)/2^I), x +/- floor(y/2^(GY-GX+I))).
module tb_atan2_xy_stage;
  localparam int W  = 16;
  localparam int GX = 10;
  localparam int GY = 15;
  localparam int XW = W + 2 + GX;
  localparam int YW = W + 2 + GY;
  localparam int GD = GY - GX;

  int checks = 0, failures = 0;

  logic signed [XW-1:0] x_i [3];
  logic signed [YW-1:0] y_i [3];
  logic signed [XW-1:0] x_o [3];
  logic signed [YW-1:0] y_o [3];
  logic                 dir [3];

  // iteration 1: full width, x updated
  atan2_xy_stage #(.W(W), .GX(GX), .GY(GY), .I(1), .YIW(YW), .YOW(YW), .UPDATE_X(1'b1)) u0 (
    .x_i(x_i[0]), .y_i(y_i[0]), .dir(dir[0]), .x_o(x_o[0]), .y_o(y_o[0]));

  // iteration 5: y narrowed from YW-2 to YW-4 bits, x updated
  logic signed [YW-5:0] y1n;
  atan2_xy_stage #(.W(W), .GX(GX), .GY(GY), .I(5), .YIW(YW-3), .YOW(YW-4), .UPDATE_X(1'b1)) u1 (
    .x_i(x_i[1]), .y_i(y_i[1][YW-4:0]), .dir(dir[1]), .x_o(x_o[1]), .y_o(y1n));
  assign y_o[1] = YW'(y1n);

  // iteration 9: x frozen
  logic signed [YW-9:0] y2n;
  atan2_xy_stage #(.W(W), .GX(GX), .GY(GY), .I(9), .YIW(YW-7), .YOW(YW-8), .UPDATE_X(1'b0)) u2 (
    .x_i(x_i[2]), .y_i(y_i[2][YW-8:0]), .dir(dir[2]), .x_o(x_o[2]), .y_o(y2n));
  assign y_o[2] = YW'(y2n);

  function automatic longint fl_shift(input longint v, input int s);
    // floor(v / 2^s) without using a shift operator on a signed value
    longint d, q;
    d = longint'(1) << s;
    q = v / d;
    if (v < 0 && q * d != v) q = q - 1;
    return q;
  endfunction

  task automatic try(input int u, input int I, input bit upd);
    longint x, y, bound, ex, ey;
    // x in [2^(XW-4), 2^(XW-2)), y within x*2^-(I-1)
    x = longint'($urandom_range(32'd1 << (XW - 3), 32'd1 << (XW - 4))) * 2 +
        longint'($urandom_range(1, 0));
    bound = (I == 1) ? x : fl_shift(x * (longint'(1) << GD), I - 1);
    y = longint'($urandom) % (bound + 1);
    if ($urandom_range(1, 0) == 1) y = -y;
    x_i[u] = XW'(x);
    y_i[u] = YW'(y);
    #1;
    if (y < 0) begin
      ey = y + fl_shift(x * (longint'(1) << GD), I);
      ex = x - fl_shift(y, GD + I);
    end else begin
      ey = y - fl_shift(x * (longint'(1) << GD), I);
      ex = x + fl_shift(y, GD + I);
    end
    if (!upd) ex = x;
    checks += 3;
    if (dir[u] !== (y < 0)) failures++;
    if (longint'(y_o[u]) != ey) failures++;
    if (longint'(x_o[u]) != ex) failures++;
    if (failures > 0 && failures < 5)
      $display("ERROR: stage %0d x %0d y %0d -> x %0d (exp %0d) y %0d (exp %0d)",
               u, x, y, x_o[u], ex, y_o[u], ey);
  endtask

  initial begin
    foreach (x_i[u]) begin x_i[u] = '0; y_i[u] = '0; end
    repeat (5000) begin
      try(0, 1, 1'b1);
      try(1, 5, 1'b1);
      try(2, 9, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
