// Self-checking testbench for lod: every one-hot word, every word with a
// random tail below a chosen leading one, and zero. The expected position is
// found by a downward scan, independent of the DUT's upward scan.
module tb_lod;
  localparam int unsigned W = 16;
  logic [W-1:0] din;
  logic [$clog2(W)-1:0] pos;
  logic valid;
  int checks = 0, failures = 0;

  lod #(.W(W)) dut (.din(din), .pos(pos), .valid(valid));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] v);
    int exp_pos;
    exp_pos = 0;
    for (int i = W - 1; i >= 0; i--) if (v[i]) begin exp_pos = i; break; end
    din = v;
    #1;
    checks++;
    if (valid !== (v != 0) || (v != 0 && int'(pos) != exp_pos)) begin
      failures++;
      $display("FAIL din=%h pos=%0d valid=%0d expected %0d", v, pos, valid, exp_pos);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < W; i++) check(W'(1) << i);
    for (int n = 0; n < 2000; n++) begin
      int top;
      logic [W-1:0] v;
      top = $urandom_range(W - 1, 0);
      v = W'($urandom) & ((W'(1) << top) - 1'b1);
      v[top] = 1'b1;
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
