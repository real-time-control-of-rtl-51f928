// Testbench for fp_scheduler: applies every READY pattern for 4 and for 6
// inputs and compares block with the expected grant, which is the
// lowest-index ready input (index 0 has the highest priority).
module tb_fp_scheduler;
  int checks = 0, failures = 0;

  logic [3:0] r4, b4;
  logic [5:0] r6, b6;

  fp_scheduler #(.N(4)) dut4 (.ready(r4), .block(b4));
  fp_scheduler #(.N(6)) dut6 (.ready(r6), .block(b6));

  function automatic logic [5:0] expect_block(logic [5:0] r, int n);
    logic [5:0] b;
    b = '1;
    for (int i = 0; i < n; i++)
      if (r[i]) begin b[i] = 1'b0; break; end
    return b;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      r4 = 4'(v); #1;
      checks++;
      if (b4 !== expect_block(6'(v), 4) [3:0]) begin
        failures++; $display("N=4 ready=%b block=%b", r4, b4);
      end
    end
    for (int v = 0; v < 64; v++) begin
      r6 = 6'(v); #1;
      checks++;
      if (b6 !== expect_block(6'(v), 6)) begin
        failures++; $display("N=6 ready=%b block=%b", r6, b6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
