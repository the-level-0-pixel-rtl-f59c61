// optin_fpga: logic of the FPGA on one OPTIN board.
//
// An OPTIN board receives 12 of the 120 optical links from the pixel
// detector; twelve G-Link receiver chips deserialize them and this FPGA
// extracts the 10 Fast-OR bits each link carries every 100 ns, gathers the 120
// bits of the board into one frame and sends it to the BRAIN processing FPGA
// on 64 lines at double data rate.
//
// Structure: 12 fastor_chan_rx extractors, one frame_align that releases the
// frame when every enabled and locked link has delivered (or on timeout),
// and a ddr_bus_tx whose input register holds the frame. Frame layout on the
// 128 bus bits per clock: [119:0] Fast-OR (link j, chip i at bit 10*j+i),
// [120] valid (set for the one clock of a new frame), [121] even parity of
// [119:0], [122] frame released by timeout, [127:123] zero. Links that
// missed a timed-out frame contribute zeros.
//
// Status and control registers sit on the local bus (device BOARD_ID):
//   0x000 id (RO)              0x001 link enable mask [11:0] (RW, reset all 1)
//   0x002 link ready [11:0]    0x003 frames sent      0x004 timeouts
//   0x010+ch {error words, good control words} of link ch
//   0x020+ch spacing errors of link ch
// A request is answered with ack and rdata in the following cycle.
//
// Following the document: 12 links, 120 bits per 100 ns, 64 DDR output lines,
// status and configuration registers on a local bus. Own choices: frame
// layout, parity, timeout, register map.
//
// Timing: a control word strobed in cycle t reaches the bus pins in cycle
// t+3 when it is the last link of the frame.
module optin_fpga
  import ptrig_pkg::*;
#(
  parameter logic [3:0]  BOARD_ID = 4'd0,
  parameter int unsigned TIMEOUT  = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  glink_word_t         word [LINKS_PER_OPTIN],
  input  logic [LINKS_PER_OPTIN-1:0] stb,
  output logic [BUS_LINES-1:0] bus_q,
  input  lbus_req_t           lb_req,
  output lbus_rsp_t           lb_rsp
);

  localparam int unsigned L = LINKS_PER_OPTIN;
  localparam int unsigned C = CHIPS_PER_LINK;

  logic [C-1:0]  fo [L];
  logic [L-1:0]  fo_new, link_ok, missing;
  logic [15:0]   n_ctrl [L];
  logic [15:0]   n_err [L];
  logic [15:0]   n_spacing [L];
  logic          rel, rel_timeout;
  logic [L-1:0]  link_mask;
  logic [31:0]   n_frames, n_timeouts;
  logic [FO_PER_OPTIN-1:0] fo_bits;
  logic [BUS_BITS-1:0]     frame;

  for (genvar j = 0; j < L; j++) begin : g_ch
    fastor_chan_rx #(.CHIPS(C)) u_ch (
      .clk, .rst_n, .word(word[j]), .stb(stb[j]),
      .fo(fo[j]), .fo_new(fo_new[j]), .link_ok(link_ok[j]),
      .n_ctrl(n_ctrl[j]), .n_err(n_err[j]), .n_spacing(n_spacing[j])
    );
    assign fo_bits[j*C +: C] = missing[j] ? '0 : fo[j];
  end

  frame_align #(.N(L), .TIMEOUT(TIMEOUT)) u_align (
    .clk, .rst_n, .en(link_mask & link_ok), .part_new(fo_new),
    .rel, .rel_timeout, .missing
  );

  always_comb begin
    frame                = '0;
    frame[FO_PER_OPTIN-1:0] = fo_bits;
    frame[FRM_VALID]     = rel;
    frame[FRM_PARITY]    = ^fo_bits;
    frame[FRM_ERROR]     = rel_timeout;
  end

  ddr_bus_tx #(.W(BUS_LINES)) u_tx (.clk, .rst_n, .d(frame), .q(bus_q));

  // ---------------- local bus registers ----------------
  logic sel;
  logic [11:0] ra;
  assign sel = (lb_req.addr[15:12] == BOARD_ID);
  assign ra  = lb_req.addr[11:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_mask  <= '1;
      n_frames   <= '0;
      n_timeouts <= '0;
      lb_rsp     <= '0;
    end else begin
      if (rel)         n_frames   <= n_frames + 32'd1;
      if (rel_timeout) n_timeouts <= n_timeouts + 32'd1;
      if (sel && lb_req.we && ra == 12'h001) link_mask <= lb_req.wdata[L-1:0];
      lb_rsp.ack   <= sel && (lb_req.we || lb_req.re);
      lb_rsp.rdata <= '0;
      if (sel && lb_req.re) begin
        unique casez (ra)
          12'h000: lb_rsp.rdata <= ID_OPTIN;
          12'h001: lb_rsp.rdata <= 32'(link_mask);
          12'h002: lb_rsp.rdata <= 32'(link_ok);
          12'h003: lb_rsp.rdata <= n_frames;
          12'h004: lb_rsp.rdata <= n_timeouts;
          default: begin
            if (ra[11:4] == 8'h01 && ra[3:0] < 4'(L))
              lb_rsp.rdata <= {n_err[ra[3:0]], n_ctrl[ra[3:0]]};
            else if (ra[11:4] == 8'h02 && ra[3:0] < 4'(L))
              lb_rsp.rdata <= {16'd0, n_spacing[ra[3:0]]};
          end
        endcase
      end
    end
  end

endmodule
