// brain_fpga: logic of the processing FPGA on the BRAIN board.
//
// The BRAIN carries the ten OPTIN boards as mezzanines and receives their
// Fast-OR frames on 10 x 64 = 640 double-data-rate lines, which is why a
// large-pin-count FPGA is used. This module captures each board bus
// (ddr_bus_rx), stores the board's 120 bits when its frame valid bit is
// seen and checks its parity, waits with frame_align until all enabled
// boards have delivered the current frame, and hands the 1200 bits to
// trigger_proc. A positive decision drives ctp_l0, the Level 0 input of the
// Central Trigger Processor, high for CTP_PULSE clocks.
//
// Registers on the local bus (device DEV_BRAIN, answered one cycle later):
//   0x000 id (RO)
//   0x001 [1:0] algorithm, [25:16] board enable mask (reset: algo 0, all boards)
//   0x002 total low threshold   0x003 total high threshold
//   0x004 inner threshold       0x005 outer threshold
//   0x006 triggers sent (RO)    0x007 frames processed (RO)
//   0x008 last multiplicity     0x009 parity errors     0x00A timeouts
//
// Following the document: 10 boards, 640 DDR lines, processing of the 1200
// bits into one CTP input, status/configuration registers. Own choices:
// capture scheme, parity, alignment and timeout, pulse width, register map.
//
// Timing: a frame whose last board bus word is on the pins in cycle t
// drives ctp_l0 from cycle t+4.
module brain_fpga
  import ptrig_pkg::*;
#(
  parameter int unsigned NB        = N_OPTIN,
  parameter int unsigned TIMEOUT   = 6,
  parameter int unsigned CTP_PULSE = 2
) (
  input  logic                 clk,
  input  logic                 clk90,
  input  logic                 rst_n,
  input  logic [BUS_LINES-1:0] bus_pins [NB],
  input  lbus_req_t            lb_req,
  output lbus_rsp_t            lb_rsp,
  output logic                 ctp_l0
);

  localparam int unsigned FB = FO_PER_OPTIN;
  localparam int unsigned NF = NB * FB;
  localparam int unsigned CW = $clog2(NF + 1);

  logic [BUS_BITS-1:0] rxw [NB];
  logic [FB-1:0]       fo_reg [NB];
  logic [NB-1:0]       part_new, missing, par_err;
  logic [NF-1:0]       fo_all;
  logic                rel, rel_timeout;

  logic [1:0]    algo;
  logic [NB-1:0] board_mask;
  logic [CW-1:0] th_lo, th_hi, th_in, th_out, total;
  logic          out_valid, trig;
  logic [31:0]   n_trig, n_frames, n_par, n_tmo;
  logic [$clog2(CTP_PULSE+1)-1:0] pulse_cnt;

  for (genvar b = 0; b < NB; b++) begin : g_bd
    ddr_bus_rx #(.W(BUS_LINES)) u_rx (.clk, .clk90, .rst_n, .pins(bus_pins[b]), .dout(rxw[b]));
    assign part_new[b] = rxw[b][FRM_VALID];
    assign par_err[b]  = rxw[b][FRM_VALID] && (^rxw[b][FB-1:0] != rxw[b][FRM_PARITY]);
    always_ff @(posedge clk) begin
      if (!rst_n)               fo_reg[b] <= '0;
      else if (rxw[b][FRM_VALID]) fo_reg[b] <= rxw[b][FB-1:0];
    end
    assign fo_all[b*FB +: FB] = missing[b] ? '0 : fo_reg[b];
  end

  frame_align #(.N(NB), .TIMEOUT(TIMEOUT)) u_align (
    .clk, .rst_n, .en(board_mask), .part_new, .rel, .rel_timeout, .missing
  );

  trigger_proc #(.NL(NB * LINKS_PER_OPTIN)) u_proc (
    .clk, .rst_n, .fo(fo_all), .in_valid(rel), .algo,
    .th_lo, .th_hi, .th_in, .th_out, .out_valid, .trig, .total
  );

  // CTP output pulse
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pulse_cnt <= '0;
      ctp_l0    <= 1'b0;
    end else if (out_valid && trig) begin
      pulse_cnt <= ($bits(pulse_cnt))'(CTP_PULSE - 1);
      ctp_l0    <= 1'b1;
    end else if (pulse_cnt != '0) begin
      pulse_cnt <= pulse_cnt - 1'b1;
    end else begin
      ctp_l0    <= 1'b0;
    end
  end

  // ---------------- local bus registers ----------------
  logic sel;
  logic [11:0] ra;
  assign sel = (lb_req.addr[15:12] == DEV_BRAIN);
  assign ra  = lb_req.addr[11:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      algo       <= 2'd0;
      board_mask <= '1;
      th_lo      <= CW'(1);
      th_hi      <= CW'(NF);
      th_in      <= CW'(1);
      th_out     <= CW'(1);
      n_trig     <= '0;
      n_frames   <= '0;
      n_par      <= '0;
      n_tmo      <= '0;
      lb_rsp     <= '0;
    end else begin
      if (out_valid && trig) n_trig   <= n_trig + 32'd1;
      if (out_valid)         n_frames <= n_frames + 32'd1;
      if (par_err != '0)     n_par    <= n_par + 32'd1;
      if (rel_timeout)       n_tmo    <= n_tmo + 32'd1;
      if (sel && lb_req.we) begin
        unique case (ra)
          12'h001: begin algo <= lb_req.wdata[1:0]; board_mask <= lb_req.wdata[16 +: NB]; end
          12'h002: th_lo  <= lb_req.wdata[CW-1:0];
          12'h003: th_hi  <= lb_req.wdata[CW-1:0];
          12'h004: th_in  <= lb_req.wdata[CW-1:0];
          12'h005: th_out <= lb_req.wdata[CW-1:0];
          default: ;
        endcase
      end
      lb_rsp.ack   <= sel && (lb_req.we || lb_req.re);
      lb_rsp.rdata <= '0;
      if (sel && lb_req.re) begin
        unique case (ra)
          12'h000: lb_rsp.rdata <= ID_BRAIN;
          12'h001: lb_rsp.rdata <= 32'(algo) | (32'(board_mask) << 16);
          12'h002: lb_rsp.rdata <= 32'(th_lo);
          12'h003: lb_rsp.rdata <= 32'(th_hi);
          12'h004: lb_rsp.rdata <= 32'(th_in);
          12'h005: lb_rsp.rdata <= 32'(th_out);
          12'h006: lb_rsp.rdata <= n_trig;
          12'h007: lb_rsp.rdata <= n_frames;
          12'h008: lb_rsp.rdata <= 32'(total);
          12'h009: lb_rsp.rdata <= n_par;
          12'h00A: lb_rsp.rdata <= n_tmo;
          default: lb_rsp.rdata <= '0;
        endcase
      end
    end
  end

endmodule
