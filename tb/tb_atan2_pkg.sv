// tb_atan2_pkg: checks the elaboration-time functions of atan2_pkg.
//  - the number of tables equals 1 + ceil((W+1-6)/5) for W = 8 .. 40, and
//    the groups tile all W+1 direction bits without gaps or overlap;
//  - the 12-bit grouping is 6/5/2 directions and the 24-bit one 6/5/5/5/4;
//  - for every W and CYC exactly CYC pipeline registers are placed, each
//    group is added no earlier than its last direction is known, and groups
//    are added in order;
//  - table entries whose value is exactly known: the pre-rotation alone
//    (+-1/4 turn) and the pre-rotation with the 45-degree iteration (+-1/8 or
//    +-3/8 turn).
module tb_atan2_pkg;
  import atan2_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("ERROR: %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int lens12[3] = '{6, 5, 2};
    int lens24[5] = '{6, 5, 5, 5, 4};
    longint t;
    for (int w = 8; w <= 40; w++) begin
      int ng, next;
      ng = num_groups(w, 6, 5);
      expect_eq(ng, 1 + int'($ceil(real'(w + 1 - 6) / 5.0)), "table count");
      next = 0;
      for (int j = 0; j < ng; j++) begin
        expect_eq(group_first(j, 6, 5), next, "group start");
        checks++;
        if (group_len(w, j, 6, 5) < 1 || group_len(w, j, 6, 5) > (j == 0 ? 6 : 5)) failures++;
        for (int b = next; b < next + group_len(w, j, 6, 5); b++)
          expect_eq(group_of_bit(b, 6, 5), j, "group of bit");
        next += group_len(w, j, 6, 5);
      end
      expect_eq(next, w + 1, "groups cover all directions");
      for (int cyc = 1; cyc <= w + 1; cyc++) begin
        int nreg, prev;
        nreg = 0;
        for (int k = 0; k <= w; k++) nreg += reg_after_step(w, cyc, k);
        expect_eq(nreg, cyc, "register count");
        prev = -1;
        for (int j = 0; j < ng; j++) begin
          int st, last_bit;
          st = group_step(w, cyc, 6, 5, j);
          last_bit = group_first(j, 6, 5) + group_len(w, j, 6, 5) - 1;
          checks += 3;
          if (st < last_bit) failures++;
          if (st < prev) failures++;
          if (!reg_after_step(w, cyc, st)) failures++;
          prev = st;
        end
        expect_eq(group_step(w, cyc, 6, 5, ng - 1), w, "last group in last step");
      end
    end
    for (int j = 0; j < 3; j++) expect_eq(group_len(12, j, 6, 5), lens12[j], "12-bit grouping");
    for (int j = 0; j < 5; j++) expect_eq(group_len(24, j, 6, 5), lens24[j], "24-bit grouping");
    // exact entries, 20-bit angles
    expect_eq(lut_entry(20, 4, -1, 1, 0, 1'b0), 20'h40000, "+1/4 turn");
    expect_eq(lut_entry(20, 4, -1, 1, 1, 1'b0), 20'hC0000, "-1/4 turn");
    expect_eq(lut_entry(20, 4, -1, 1, 0, 1'b1), 20'h40008, "+1/4 turn, rounded");
    expect_eq(lut_entry(20, 4, -1, 2, 0, 1'b0), 20'h60000, "+3/8 turn");
    expect_eq(lut_entry(20, 4, -1, 2, 2, 1'b0), 20'h20000, "+1/8 turn");
    expect_eq(lut_entry(20, 4, -1, 2, 1, 1'b0), 20'hE0000, "-1/8 turn");
    expect_eq(lut_entry(20, 4, -1, 2, 3, 1'b0), 20'hA0000, "-3/8 turn");
    // atan(1/2) = 0.0737918... turn -> round(0.0737918 * 2^20) = 77376 (0x12E40)
    t = lut_entry(20, 4, 1, 1, 0, 1'b0);
    checks++;
    if (t < 77375 || t > 77377) begin
      failures++;
      $display("ERROR: atan(1/2) entry %0d", t);
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
