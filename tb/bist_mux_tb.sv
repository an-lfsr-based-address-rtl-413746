// bist_mux_tb: self-checking test of the test-mode multiplexers. Random
// normal-mode and BIST values are applied with bist_cs low and high; the
// memory side must follow the selected source.
module bist_mux_tb;

  localparam int AW = 16;
  localparam int DW = 32;

  logic          bist_cs;
  logic [AW-1:0] norm_addr, bist_addr, mem_addr;
  logic [DW-1:0] norm_data, bist_data, mem_data;
  logic          norm_w_r, bist_w_r, mem_w_r;
  int checks = 0, failures = 0;

  bist_mux #(.AW(AW), .DW(DW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      bist_cs   = i[0];
      norm_addr = AW'($urandom); bist_addr = AW'($urandom);
      norm_data = $urandom;      bist_data = $urandom;
      norm_w_r  = 1'($urandom);  bist_w_r  = 1'($urandom);
      #1;
      checks++;
      if (bist_cs ? (mem_addr != bist_addr || mem_data != bist_data || mem_w_r != bist_w_r)
                  : (mem_addr != norm_addr || mem_data != norm_data || mem_w_r != norm_w_r)) begin
        failures++;
        $display("FAIL: bist_cs=%0d selects the wrong source", bist_cs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
