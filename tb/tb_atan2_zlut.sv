// tb_atan2_zlut: checks the z-path tables. A first-group table (six
// directions including the pi/2 pre-rotation, rounding constant, no adder)
// and an accumulating five-direction table are driven with every address and
// random accumulated angles. The expected value is the exact angle sum
// -sum d*atan(2^-i)/(2*pi), rounded to W+ZG bits, plus the rounding constant
// for the first table and plus z_i for the accumulating one (modulo a turn).
module tb_atan2_zlut;
  localparam int  W  = 16;
  localparam int  ZG = 4;
  localparam int  ZW = W + ZG;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;

  logic [5:0]    d0;
  logic [4:0]    d1;
  logic [ZW-1:0] zi, z0, z1;

  atan2_zlut #(.W(W), .ZG(ZG), .FIRST_DIR(-1), .LEN(6), .ACCUMULATE(1'b0), .ROUND(1'b1)) u0 (
    .d(d0), .z_i(zi), .z_o(z0));
  atan2_zlut #(.W(W), .ZG(ZG), .FIRST_DIR(5), .LEN(5), .ACCUMULATE(1'b1), .ROUND(1'b0)) u1 (
    .d(d1), .z_i(zi), .z_o(z1));

  function automatic longint expect_val(input int first, input int len, input int a);
    real s, ang;
    longint r;
    s = 0.0;
    for (int k = 0; k < len; k++) begin
      ang = (first + k < 0) ? PI / 2.0 : $atan(1.0 / (2.0 ** (first + k)));
      // address bit set: the y value was negative, the vector turns by +ang
      s += (((a >> k) % 2) == 1) ? -ang : ang;
    end
    s = s / (2.0 * PI) * (2.0 ** ZW);
    r = longint'($floor(s + 0.5));
    return r;
  endfunction

  initial begin
    longint e;
    for (int a = 0; a < 64; a++) begin
      d0 = 6'(a);
      zi = ZW'($urandom);
      #1;
      e = (expect_val(-1, 6, a) + (longint'(1) << (ZG - 1))) % (longint'(1) << ZW);
      if (e < 0) e += longint'(1) << ZW;
      checks++;
      if (longint'(z0) != e) begin
        failures++;
        $display("ERROR: first table %0d: %0d expected %0d", a, z0, e);
      end
    end
    for (int a = 0; a < 32; a++) begin
      repeat (4) begin
        d1 = 5'(a);
        zi = ZW'($urandom);
        #1;
        e = (expect_val(5, 5, a) + longint'(zi)) % (longint'(1) << ZW);
        if (e < 0) e += longint'(1) << ZW;
        checks++;
        if (longint'(z1) != e) begin
          failures++;
          $display("ERROR: table %0d + %0d: %0d expected %0d", a, zi, z1, e);
        end
      end
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
