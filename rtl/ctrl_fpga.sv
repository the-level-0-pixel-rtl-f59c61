// ctrl_fpga: slow-control logic of the control FPGA on the BRAIN board.
//
// All status and configuration of the Pixel Trigger system is reached from
// the experiment's control system over the detector data link (DDL). This
// block decodes the command words arriving from the link interface and
//   - reads and writes the registers of all FPGAs over the local bus,
//   - stores a downloaded bitstream in the local SRAM,
//   - drives jtag_player to write it into the PROM of the processing FPGA
//     and to launch the reconfiguration.
//
// Command format (one header word, then data words):
//   header = {op[31:28], len[27:16], addr[15:0]}
//   op 1 REG_WR    : len data words written to local-bus addr, addr+1, ...
//   op 2 REG_RD    : len registers read from addr on; one response word each
//                    (0xFFFFFFFF if no device acknowledges within 15 clocks)
//   op 3 SRAM_PTR  : one data word = SRAM word address for the next ops
//   op 4 SRAM_WR   : len data words written to the SRAM from the pointer on
//   op 5 JTAG_RST  : JTAG reset to Run-Test/Idle
//   op 6 JTAG_IR   : shift instruction addr[IR_LEN-1:0]
//   op 7 JTAG_DR   : one data word = bit count; shift that many bits from the
//                    SRAM, starting at the pointer, into the data register
//   op 8 RUNTEST   : one data word = TCK cycles to wait in Run-Test/Idle
//   op 9 STATUS    : one response word = last 32 TDO bits
// Reads of device DEV_CTRL (addr[15:12] = 11) return this FPGA's own status
// without a bus cycle: 0x000 id, 0x001 {JTAG busy [24], SRAM pointer},
// 0x002 last 32 TDO bits, 0x003 command headers received.
// cmd_ready is low while a register access or a JTAG operation runs.
// Local-bus requests are one-cycle strobes; the device answers with ack.
// The SRAM is synchronous: a write in the cycle of sram_we, read data in the
// cycle after sram_rd.
//
// Following the document: register access over a local bus, bitstream
// download into SRAM, JTAG transfer to the PROM, JTAG-launched
// reconfiguration. Own choices: the command format and the SRAM interface;
// the link protocol itself is outside this block.
module ctrl_fpga
  import ptrig_pkg::*;
#(
  parameter int unsigned SRAM_AW = 20,
  parameter int unsigned IR_LEN  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // command words from the link interface
  input  logic [31:0]        cmd_data,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  output logic [31:0]        rsp_data,
  output logic               rsp_valid,
  // local bus master
  output lbus_req_t          lb_req,
  input  lbus_rsp_t          lb_rsp,
  // firmware SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [31:0]        sram_wdata,
  output logic               sram_we,
  output logic               sram_rd,
  input  logic [31:0]        sram_rdata,
  // JTAG chain
  output logic               tck,
  output logic               tms,
  output logic               tdi,
  input  logic               tdo
);

  typedef enum logic [3:0] {
    OP_NOP = 4'd0, OP_REG_WR = 4'd1, OP_REG_RD = 4'd2, OP_SRAM_PTR = 4'd3,
    OP_SRAM_WR = 4'd4, OP_JTAG_RST = 4'd5, OP_JTAG_IR = 4'd6, OP_JTAG_DR = 4'd7,
    OP_RUNTEST = 4'd8, OP_STATUS = 4'd9
  } op_t;

  typedef enum logic [2:0] {C_HDR, C_DATA, C_RD_ISSUE, C_LB_WAIT, C_JTAG} cstate_t;

  cstate_t            st;
  op_t                op;
  logic [11:0]        cnt;
  logic [15:0]        addr;
  logic [SRAM_AW-1:0] ptr;
  logic [3:0]         lb_timer;
  logic               j_start, j_busy, j_started;
  logic [1:0]         j_op;
  logic [31:0]        j_nbits;
  logic [IR_LEN-1:0]  j_ir;
  logic [31:0]        tdo_cap;
  logic               j_rd;
  logic [SRAM_AW-1:0] j_addr;
  logic [SRAM_AW-1:0] c_addr;
  logic [31:0]        n_cmd;      // command headers received

  jtag_player #(.IR_LEN(IR_LEN), .SRAM_AW(SRAM_AW)) u_jtag (
    .clk, .rst_n, .start(j_start), .op(j_op), .ir(j_ir), .nbits(j_nbits),
    .addr(ptr), .busy(j_busy), .tdo_cap, .sram_rd(j_rd), .sram_addr(j_addr),
    .sram_rdata, .tck, .tms, .tdi, .tdo
  );

  assign cmd_ready = (st == C_HDR) || (st == C_DATA);
  assign sram_rd   = j_rd;
  assign sram_addr = j_busy ? j_addr : c_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= C_HDR;
      op        <= OP_NOP;
      cnt       <= '0;
      addr      <= '0;
      ptr       <= '0;
      lb_timer  <= '0;
      lb_req    <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      sram_we   <= 1'b0;
      sram_wdata<= '0;
      c_addr    <= '0;
      j_start   <= 1'b0;
      j_started <= 1'b0;
      j_op      <= '0;
      j_nbits   <= '0;
      j_ir      <= '0;
      n_cmd     <= '0;
    end else begin
      lb_req.we <= 1'b0;
      lb_req.re <= 1'b0;
      rsp_valid <= 1'b0;
      sram_we   <= 1'b0;
      j_start   <= 1'b0;
      unique case (st)
        C_HDR: if (cmd_valid) begin
          n_cmd <= n_cmd + 32'd1;
          op   <= op_t'(cmd_data[31:28]);
          cnt  <= cmd_data[27:16];
          addr <= cmd_data[15:0];
          unique case (op_t'(cmd_data[31:28]))
            OP_REG_WR, OP_SRAM_WR: if (cmd_data[27:16] != '0) st <= C_DATA;
            OP_SRAM_PTR, OP_JTAG_DR, OP_RUNTEST: begin cnt <= 12'd1; st <= C_DATA; end
            OP_REG_RD:   if (cmd_data[27:16] != '0) st <= C_RD_ISSUE;
            OP_JTAG_RST: begin j_op <= 2'd0; j_start <= 1'b1; j_started <= 1'b0; st <= C_JTAG; end
            OP_JTAG_IR:  begin j_op <= 2'd1; j_ir <= cmd_data[IR_LEN-1:0]; j_start <= 1'b1;
                               j_started <= 1'b0; st <= C_JTAG; end
            OP_STATUS:   begin rsp_data <= tdo_cap; rsp_valid <= 1'b1; end
            default: ;
          endcase
        end
        C_DATA: if (cmd_valid) begin
          unique case (op)
            OP_REG_WR: begin
              lb_req.we    <= 1'b1;
              lb_req.addr  <= addr;
              lb_req.wdata <= cmd_data;
              lb_timer     <= '0;
              st           <= C_LB_WAIT;
            end
            OP_SRAM_WR: begin
              sram_we    <= 1'b1;
              c_addr     <= ptr;
              sram_wdata <= cmd_data;
              ptr        <= ptr + 1'b1;
              cnt        <= cnt - 12'd1;
              if (cnt == 12'd1) st <= C_HDR;
            end
            OP_SRAM_PTR: begin ptr <= cmd_data[SRAM_AW-1:0]; st <= C_HDR; end
            OP_JTAG_DR:  begin j_op <= 2'd2; j_nbits <= cmd_data; j_start <= 1'b1;
                               j_started <= 1'b0; st <= C_JTAG; end
            OP_RUNTEST:  begin j_op <= 2'd3; j_nbits <= cmd_data; j_start <= 1'b1;
                               j_started <= 1'b0; st <= C_JTAG; end
            default: st <= C_HDR;
          endcase
        end
        C_RD_ISSUE: begin
          if (addr[15:12] == DEV_CTRL) begin
            // own status registers, answered without a bus cycle
            rsp_valid <= 1'b1;
            unique case (addr[11:0])
              12'h000: rsp_data <= ID_CTRL;
              12'h001: rsp_data <= {7'd0, j_busy, 24'(ptr)};
              12'h002: rsp_data <= tdo_cap;
              12'h003: rsp_data <= n_cmd;
              default: rsp_data <= '0;
            endcase
            addr <= addr + 16'd1;
            cnt  <= cnt - 12'd1;
            if (cnt == 12'd1) st <= C_HDR;
          end else begin
            lb_req.re   <= 1'b1;
            lb_req.addr <= addr;
            lb_timer    <= '0;
            st          <= C_LB_WAIT;
          end
        end
        C_LB_WAIT: begin
          lb_timer <= lb_timer + 4'd1;
          if (lb_rsp.ack || lb_timer == 4'd15) begin
            if (op == OP_REG_RD) begin
              rsp_valid <= 1'b1;
              rsp_data  <= lb_rsp.ack ? lb_rsp.rdata : 32'hFFFF_FFFF;
            end
            addr <= addr + 16'd1;
            cnt  <= cnt - 12'd1;
            if (cnt == 12'd1)          st <= C_HDR;
            else if (op == OP_REG_RD)  st <= C_RD_ISSUE;
            else                       st <= C_DATA;
          end
        end
        C_JTAG: begin
          if (j_busy) j_started <= 1'b1;
          if (j_started && !j_busy) st <= C_HDR;
        end
        default: st <= C_HDR;
      endcase
    end
  end

endmodule
