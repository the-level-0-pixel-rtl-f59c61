// pixel_trigger_top: the Level 0 Pixel Trigger electronics.
//
// The 1200 readout chips of the ALICE pixel detector each report, every
// 100 ns, one Fast-OR bit saying whether any of their pixels was hit. The
// bits travel on the 120 G-Link optical links of the detector readout, and
// this system turns them into a Level 0 trigger input within a tight
// latency budget. Data path:
//   120 deserializer outputs -> 10 x optin_fpga (12 links each, Fast-OR
//   extraction and frame alignment) -> 10 x 64 DDR lines -> brain_fpga
//   (1200-bit frame, trigger algorithm) -> ctp_l0
// Control path: ctrl_fpga takes command words from the data-link interface
// and is the master of the local bus that reaches the registers of all 11
// FPGAs; it also owns the firmware SRAM and the JTAG chain used to
// reprogram the processing FPGA. The optical receivers, deserializer chips,
// SRAM, PROM and link interface are outside the logic: their signals are
// ports of this module.
//
// Clocks: clk is the 80.16 MHz system clock (twice the bunch-crossing
// clock) shared by all FPGAs; clk90 is the same clock delayed by a quarter
// period and is used only to sample the DDR buses in the BRAIN.
// rx_stb[j] marks a new 25 ns word of link j, synchronous to clk.
//
// Latency: a control word that completes a frame, strobed in cycle t, gives
// ctp_l0 high from cycle t+7 (about 87 ns), to which the deserializer
// latency (about 88 ns) adds.
module pixel_trigger_top
  import ptrig_pkg::*;
#(
  parameter int unsigned SRAM_AW = 20,
  parameter int unsigned IR_LEN  = 8
) (
  input  logic               clk,
  input  logic               clk90,
  input  logic               rst_n,
  // deserializer outputs, link j = board j/12, board channel j%12
  input  glink_word_t        rx_word [N_LINKS],
  input  logic [N_LINKS-1:0] rx_stb,
  // Level 0 input of the Central Trigger Processor
  output logic               ctp_l0,
  // data-link command interface
  input  logic [31:0]        cmd_data,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  output logic [31:0]        rsp_data,
  output logic               rsp_valid,
  // firmware SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [31:0]        sram_wdata,
  output logic               sram_we,
  output logic               sram_rd,
  input  logic [31:0]        sram_rdata,
  // JTAG chain of the processing FPGA's PROM
  output logic               tck,
  output logic               tms,
  output logic               tdi,
  input  logic               tdo
);

  logic [BUS_LINES-1:0] bus [N_OPTIN];
  lbus_req_t            lb_req;
  lbus_rsp_t            rsp_optin [N_OPTIN];
  lbus_rsp_t            rsp_brain;
  lbus_rsp_t            lb_rsp;

  for (genvar b = 0; b < N_OPTIN; b++) begin : g_optin
    optin_fpga #(.BOARD_ID(4'(b))) u_optin (
      .clk, .rst_n,
      .word(rx_word[b*LINKS_PER_OPTIN +: LINKS_PER_OPTIN]),
      .stb(rx_stb[b*LINKS_PER_OPTIN +: LINKS_PER_OPTIN]),
      .bus_q(bus[b]), .lb_req, .lb_rsp(rsp_optin[b])
    );
  end

  brain_fpga u_brain (
    .clk, .clk90, .rst_n, .bus_pins(bus), .lb_req, .lb_rsp(rsp_brain), .ctp_l0
  );

  // Only the addressed device answers; the others drive zero.
  always_comb begin
    lb_rsp = rsp_brain;
    for (int b = 0; b < int'(N_OPTIN); b++) lb_rsp = lb_rsp | rsp_optin[b];
  end

  ctrl_fpga #(.SRAM_AW(SRAM_AW), .IR_LEN(IR_LEN)) u_ctrl (
    .clk, .rst_n, .cmd_data, .cmd_valid, .cmd_ready, .rsp_data, .rsp_valid,
    .lb_req, .lb_rsp, .sram_addr, .sram_wdata, .sram_we, .sram_rd, .sram_rdata,
    .tck, .tms, .tdi, .tdo
  );

endmodule
