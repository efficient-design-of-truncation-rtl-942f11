// Self-checking testbench for shift_unit: every shift amount pair with
// random mantissas; expected value is floor(m * 2^(k1+k2) / 2^FM) in 64-bit
// integer arithmetic.
module tb_shift_unit;
  localparam int unsigned N = 16, FM = 10, MW = FM + 2, KW = $clog2(N);
  logic [MW-1:0] m;
  logic [KW-1:0] k1, k2;
  logic [2*N-1:0] prod;
  int checks = 0, failures = 0;

  shift_unit #(.N(N), .FM(FM), .MW(MW)) dut (.m(m), .k1(k1), .k2(k2), .prod(prod));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int r = 0; r < 8; r++) begin
          longint unsigned exp_p;
          m  = MW'($urandom);
          k1 = KW'(i);
          k2 = KW'(j);
          #1;
          exp_p = (longint'(m) << (i + j)) >> FM;
          checks++;
          if (longint'(prod) != exp_p) begin
            failures++;
            if (failures < 10)
              $display("FAIL m=%h k1=%0d k2=%0d prod=%h exp=%h", m, i, j, prod, exp_p);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
