// tb_orap_weighted_lock: checks the weighted-locking layer at its default
// size (256 key bits, 512 lines, three-input control gates). The expected
// output is computed independently: a key gate inverts its line exactly when
// any key bit of its group differs from the correct key. Checked: the
// correct key is transparent, a single wrong bit flips exactly the line of
// its group, and random keys corrupt on average about 7/8 of the gated
// lines.
module tb_orap_weighted_lock;
  timeunit 1ns; timeprecision 1ps;

  localparam int NK = 256;
  localparam int NL = 512;
  localparam int CI = 3;
  localparam int NG = NK / CI;
  localparam logic [NK-1:0] CK = {(NK + 31) / 32 {32'h5A3C_96E1}};

  logic [NK-1:0] key;
  logic [NL-1:0] lin, lout, exp_out;
  int checks = 0;
  int failures = 0;
  longint flipped = 0;

  orap_weighted_lock dut (.key(key), .lines_in(lin), .lines_out(lout));

  function automatic logic [NL-1:0] model(input logic [NK-1:0] k, input logic [NL-1:0] l);
    logic [NL-1:0] o = l;
    for (int g = 0; g < NG; g++) begin
      int lo = g * CI;
      int hi = (g == NG - 1) ? NK - 1 : lo + CI - 1;
      logic wrong = 1'b0;
      for (int b = lo; b <= hi; b++) wrong |= (k[b] != CK[b]);
      o[(g * NL) / NG] ^= wrong;
    end
    return o;
  endfunction

  task automatic rand_lines();
    for (int i = 0; i < NL / 32; i++) lin[i*32 +: 32] = $urandom;
  endtask

  task automatic check(input string what);
    #1;
    exp_out = model(key, lin);
    checks++;
    if (lout !== exp_out) begin
      failures++;
      $display("FAIL %s: out=%h expected %h", what, lout, exp_out);
    end
  endtask

  initial begin
    // correct key: transparent
    for (int t = 0; t < 20; t++) begin
      key = CK; rand_lines();
      check("correct key");
      checks++;
      if (lout !== lin) begin failures++; $display("FAIL correct key not transparent"); end
    end
    // one wrong bit: exactly one line flips
    for (int b = 0; b < NK; b++) begin
      key = CK; key[b] = ~key[b]; rand_lines();
      check("single wrong bit");
      checks++;
      if ($countones(lout ^ lin) != 1) begin
        failures++; $display("FAIL bit %0d flips %0d lines", b, $countones(lout ^ lin));
      end
    end
    // random keys: about 7/8 of the gates actuate
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NK / 32; i++) key[i*32 +: 32] = $urandom;
      rand_lines();
      check("random key");
      flipped += $countones(lout ^ lin);
    end
    checks++;
    if (flipped < 200 * NG * 3 / 4 || flipped > 200 * NG) begin
      failures++;
      $display("FAIL corruption: %0d flipped lines over 200 keys", flipped);
    end
    $display("average gates actuated per random key: %0d of %0d", flipped / 200, NG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
