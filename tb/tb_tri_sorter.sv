// Self-checking testbench of the triple-input sorter: every ordering of
// edge values plus random triples, against a reference sort.
module tb_tri_sorter;
  logic [7:0] a, b, c, hi, md, lo;
  int checks = 0, failures = 0;

  tri_sorter #(.W(8)) dut (.a, .b, .c, .hi, .md, .lo);

  task automatic check(logic [7:0] x, logic [7:0] y, logic [7:0] z);
    logic [7:0] s [3];
    logic [7:0] t;
    s[0] = x; s[1] = y; s[2] = z;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2 - i; j++)
        if (s[j] < s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
    a = x; b = y; c = z;
    #1;
    checks++;
    if (hi !== s[0] || md !== s[1] || lo !== s[2]) begin
      failures++;
      $display("FAIL in %0d %0d %0d: got %0d %0d %0d exp %0d %0d %0d",
               x, y, z, hi, md, lo, s[0], s[1], s[2]);
    end
  endtask

  initial begin
    logic [7:0] v [4];
    v[0] = 0; v[1] = 1; v[2] = 128; v[3] = 255;
    foreach (v[i]) foreach (v[j]) foreach (v[k]) check(v[i], v[j], v[k]);
    // worked example: column 3,1,5 sorts to 5,3,1
    check(8'd3, 8'd1, 8'd5);
    repeat (3000) check(8'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
