// mbist_top: memory built-in self-test of a 64k x 32 SRAM with the
// low-switching LFSR address generator.
//
// Structure (one clock, SYSCLK = CLK = L_LFSR_CLK):
//   bist_controller  - March sequencer: BIST_W/R, BIST_CS, updn, adv,
//                      Test passed
//   lfsr_addr_gen    - BIST_Address: 13-bit high LFSR on the divided
//                      H_LFSR_CLK plus 3-bit low LFSR on L_LFSR_CLK
//   test_vector_gen  - BIST_Data and the ideal read data
//   bist_mux         - BIST_CS selects BIST or normal-mode access
//   sram             - the memory under test
//   data_comparator  - Test fail and Fault data
// When bist_test goes high the controller takes the memory (bist_cs = 1),
// runs the March algorithm of mbist_pkg over all 2^AW addresses in the LFSR
// order, and raises test_done with test_passed or test_fail. Outside a test
// the memory is reached through the norm_* ports; data_out is always the
// memory's read port. The block split and signal names follow the structure
// of the source; the controller's algorithm and handshake are this design's.
//
// Interface: clk rising edge; rst_n asynchronous, active low; bist_test is a
// level held high until test_done, then taken low. A normal-mode read
// returns data_out one cycle after it is issued.
module mbist_top #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 32,
  parameter int unsigned L  = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bist_test,
  input  logic [AW-1:0] norm_addr,
  input  logic [DW-1:0] norm_data,
  input  logic          norm_w_r,
  output logic [DW-1:0] data_out,
  output logic          bist_cs,
  output logic          test_done,
  output logic          test_passed,
  output logic          test_fail,
  output logic [DW-1:0] fault_data,
  output logic [DW-1:0] fault_ideal,
  output logic [AW-1:0] bist_addr,
  output logic          h_lfsr_clk
);

  logic          bist_w_r, op_valid, op_value, updn, adv, clear, at_end;
  logic          cmp_en;
  logic [DW-1:0] bist_data, ideal_data;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_data;
  logic          mem_w_r;

  bist_controller u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .bist_test   (bist_test),
    .at_end      (at_end),
    .test_fail   (test_fail),
    .bist_cs     (bist_cs),
    .bist_w_r    (bist_w_r),
    .op_valid    (op_valid),
    .op_value    (op_value),
    .updn        (updn),
    .adv         (adv),
    .clear       (clear),
    .test_done   (test_done),
    .test_passed (test_passed)
  );

  lfsr_addr_gen #(.N(AW), .L(L)) u_agen (
    .l_lfsr_clk (clk),
    .rst_n      (rst_n),
    .updn       (updn),
    .adv        (adv),
    .addr       (bist_addr),
    .h_lfsr_clk (h_lfsr_clk),
    .at_end     (at_end)
  );

  test_vector_gen #(.DW(DW)) u_tvg (
    .clk        (clk),
    .rst_n      (rst_n),
    .op_valid   (op_valid),
    .op_write   (bist_w_r),
    .op_value   (op_value),
    .bist_data  (bist_data),
    .ideal_data (ideal_data),
    .cmp_en     (cmp_en)
  );

  bist_mux #(.AW(AW), .DW(DW)) u_mux (
    .bist_cs   (bist_cs),
    .norm_addr (norm_addr),
    .norm_data (norm_data),
    .norm_w_r  (norm_w_r),
    .bist_addr (bist_addr),
    .bist_data (bist_data),
    .bist_w_r  (bist_w_r),
    .mem_addr  (mem_addr),
    .mem_data  (mem_data),
    .mem_w_r   (mem_w_r)
  );

  sram #(.AW(AW), .DW(DW)) u_mem (
    .clk      (clk),
    .w_r      (mem_w_r),
    .addr     (mem_addr),
    .data_in  (mem_data),
    .data_out (data_out)
  );

  data_comparator #(.DW(DW)) u_cmp (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (clear),
    .cmp_en      (cmp_en),
    .ideal_data  (ideal_data),
    .data_out    (data_out),
    .test_fail   (test_fail),
    .fault_data  (fault_data),
    .fault_ideal (fault_ideal)
  );

endmodule
