// jtag_player: drives a JTAG chain from the control FPGA.
//
// The processing FPGA is reconfigured remotely: the new bitstream is first
// stored in a local SRAM, then written over JTAG into the flash PROM of the
// processing FPGA, and finally a JTAG instruction starts the FPGA
// configuration. The device-specific programming sequence is a list of the
// generic JTAG operations this block performs (op, started by a start pulse
// while busy is low):
//   OP_RESET   : 5 x TMS=1 (Test-Logic-Reset), then TMS=0 into Run-Test/Idle
//   OP_IR      : Idle -> Shift-IR, shift IR_LEN bits of ir (LSB first) -> Idle
//   OP_DR_SRAM : Idle -> Shift-DR, shift nbits bits read from the SRAM from
//                word address addr on (32-bit words, LSB first) -> Idle
//   OP_RUNTEST : nbits TCK cycles with TMS=0 in Run-Test/Idle (wait times)
// The last 32 TDO bits sampled during a shift are kept in tdo_cap, e.g. to
// read back an IDCODE.
//
// TCK runs at half the system clock: TMS and TDI change while TCK is low and
// are sampled by the chain on its rising edge; TDO is sampled at the same
// edge. Before each new 32-bit SRAM word TCK is held low for three extra
// clocks while the word is read (sram_rdata is taken in the clock after the
// one in which sram_rd is high).
//
// Following the document: bitstream moved from SRAM to the PROM by JTAG and
// reconfiguration launched by a JTAG command. Own choices: everything about
// the operation set and timing; the vendor's PROM algorithm is not built in.
module jtag_player #(
  parameter int unsigned IR_LEN  = 8,
  parameter int unsigned SRAM_AW = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [1:0]         op,
  input  logic [IR_LEN-1:0]  ir,
  input  logic [31:0]        nbits,
  input  logic [SRAM_AW-1:0] addr,
  output logic               busy,
  output logic [31:0]        tdo_cap,
  // SRAM read port
  output logic               sram_rd,
  output logic [SRAM_AW-1:0] sram_addr,
  input  logic [31:0]        sram_rdata,
  // JTAG pins
  output logic               tck,
  output logic               tms,
  output logic               tdi,
  input  logic               tdo
);

  localparam logic [1:0] OP_RESET = 2'd0, OP_IR = 2'd1, OP_DR_SRAM = 2'd2, OP_RUNTEST = 2'd3;

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_FETCH} state_t;
  state_t st;

  logic [1:0]  cur_op;
  logic [5:0]  pre_pat;      // TMS bits before the shift, LSB first
  logic [2:0]  pre_len;
  logic [1:0]  post_len;     // post pattern is TMS=1 then TMS=0
  logic [31:0] shift_len;
  logic [31:0] pos;          // step index
  logic [31:0] shreg;        // data being shifted out on TDI
  logic [4:0]  wbit;         // bit index within the SRAM word
  logic        fetch_wait;
  logic        fetch_ph;
  logic [31:0] total;
  logic        in_pre, in_shift, is_last_shift;
  logic [31:0] spos, ppos;

  assign total         = 32'(pre_len) + shift_len + 32'(post_len);
  assign in_pre        = pos < 32'(pre_len);
  assign spos          = pos - 32'(pre_len);
  assign in_shift      = !in_pre && (spos < shift_len);
  assign ppos          = spos - shift_len;
  assign is_last_shift = in_shift && (spos == shift_len - 1);
  assign busy          = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      tck        <= 1'b0;
      tms        <= 1'b1;
      tdi        <= 1'b0;
      tdo_cap    <= '0;
      sram_rd    <= 1'b0;
      sram_addr  <= '0;
      cur_op     <= OP_RESET;
      pre_pat    <= '0;
      pre_len    <= '0;
      post_len   <= '0;
      shift_len  <= '0;
      pos        <= '0;
      shreg      <= '0;
      wbit       <= '0;
      fetch_wait <= 1'b0;
      fetch_ph   <= 1'b0;
    end else begin
      sram_rd <= 1'b0;
      unique case (st)
        S_IDLE: begin
          tck <= 1'b0;
          if (start) begin
            cur_op <= op;
            pos    <= '0;
            wbit   <= '0;
            unique case (op)
              OP_RESET:   begin pre_pat <= 6'b01_1111; pre_len <= 3'd6; shift_len <= '0;            post_len <= 2'd0; end
              OP_IR:      begin pre_pat <= 6'b00_0011; pre_len <= 3'd4; shift_len <= 32'(IR_LEN);  post_len <= 2'd2; end
              OP_DR_SRAM: begin pre_pat <= 6'b00_0001; pre_len <= 3'd3; shift_len <= nbits;        post_len <= 2'd2; end
              OP_RUNTEST: begin pre_pat <= 6'b00_0000; pre_len <= 3'd0; shift_len <= nbits;        post_len <= 2'd0; end
            endcase
            shreg     <= 32'(ir);
            sram_addr <= addr;
            st        <= S_LOW;
          end
        end
        S_LOW: begin
          // drive TMS/TDI for step pos while TCK is low
          tck <= 1'b0;
          if (pos >= total) begin
            st <= S_IDLE;
          end else if (in_shift && cur_op == OP_DR_SRAM && wbit == 5'd0 && !fetch_wait) begin
            sram_rd    <= 1'b1;      // fetch the next word, TCK stays low
            fetch_wait <= 1'b1;
            st         <= S_FETCH;
          end else begin
            fetch_wait <= 1'b0;
            if (in_pre) begin
              tms <= pre_pat[pos[2:0]];
              tdi <= 1'b0;
            end else if (in_shift) begin
              tms <= is_last_shift && (cur_op != OP_RUNTEST);
              tdi <= (cur_op == OP_RUNTEST) ? 1'b0 : shreg[0];
            end else begin
              tms <= (ppos == 0);
              tdi <= 1'b0;
            end
            st <= S_HIGH;
          end
        end
        S_FETCH: begin
          // first cycle: sram_rd is high; second cycle: sram_rdata is valid
          fetch_ph <= !fetch_ph;
          if (fetch_ph) begin
            shreg     <= sram_rdata;
            sram_addr <= sram_addr + 1'b1;
            st        <= S_LOW;
          end
        end
        S_HIGH: begin
          tck <= 1'b1;
          if (in_shift && cur_op != OP_RUNTEST) begin
            tdo_cap <= {tdo, tdo_cap[31:1]};
            shreg   <= shreg >> 1;
            wbit    <= wbit + 5'd1;
          end
          pos <= pos + 32'd1;
          st  <= S_LOW;
        end
      endcase
    end
  end

endmodule
