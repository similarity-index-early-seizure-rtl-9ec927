// tb_sid_log2: compares the scaled log2 with a reference that computes the
// table entry with real arithmetic, over every 17-bit input.
module tb_sid_log2;
  localparam int unsigned IN_W  = 17;
  localparam int unsigned OUT_W = $clog2(IN_W) + 4;

  logic [IN_W-1:0]  x;
  logic [OUT_W-1:0] log2_x;
  int checks = 0, failures = 0;

  sid_log2 #(.IN_W(IN_W)) dut (.*);

  initial begin
    for (int i = 0; i < 2 ** IN_W; i++) begin
      x = IN_W'(i);
      #1;
      checks++;
      if (int'(log2_x) != sid_ref_pkg::ref_log2(longint'(i))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: log2(%0d) = %0d, expected %0d", i, log2_x, sid_ref_pkg::ref_log2(longint'(i)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 ** IN_W * 4);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
