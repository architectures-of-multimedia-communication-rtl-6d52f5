// tx_dma: transmit DMA unit.
//
// It serves the send queue written by the protocol processor.  For each
// command it gathers the packet: hdr_len header bytes from the command's slot
// in the transmit header memory (from offset 0 of the slot), then data_len
// payload bytes either from the slot's buffer in the transmit data memory or,
// for isochronous data, from the multimedia FIFO named in the command.  The
// bytes go out as a stream, with the command's CN on out_cn, to the transmit
// check-sequence generator, which computes and inserts the check sequence.
// Memory reads take one clock, so the unit keeps a small output queue and
// issues a read only when the queue has room for it; with out_ready held high
// it delivers one byte per clock.  If the multimedia FIFO runs empty the unit
// waits for data.  When the last byte has left, done pulses with the slot
// number so the processor may reuse the slot, and the next command is taken.
// A command must describe at least one byte.
//
// From the architecture: the DMA unit serves the send queue and gathers the
// header from header memory and the data from data memory or a multimedia
// FIFO. This design's choices: the command format, the slot addressing and
// the small output queue.
//
// The assertions are checked on the clock only while rst_n is high; that
// clocked read of the asynchronous reset is for checking only and adds no
// logic, though lint tools report it as a mixed synchronous/asynchronous use.
module tx_dma
  import mpa_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // send queue (show-ahead)
  input  logic                   sq_valid,
  input  send_cmd_t              sq_cmd,
  output logic                   sq_pop,
  // header memory, DMA port (reads)
  output logic                   hm_en,
  output logic [$clog2(HMEM_BYTES)-1:0] hm_addr,
  input  logic [7:0]             hm_rdata,
  // data memory, DMA port (reads)
  output logic                   dm_en,
  output logic [$clog2(DMEM_BYTES)-1:0] dm_addr,
  input  logic [7:0]             dm_rdata,
  // transmit multimedia FIFOs (show-ahead)
  output logic [NUM_MMF-1:0]     mmf_rd,
  input  logic [NUM_MMF-1:0][7:0] mmf_rdata,
  input  logic [NUM_MMF-1:0]     mmf_empty,
  // packet stream to the transmit check-sequence generator
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [7:0]             out_data,
  output logic                   out_sop,
  output logic                   out_eop,
  output cn_t                    out_cn,
  // completion
  output logic                   done,
  output logic [SLOT_W-1:0]      done_slot
);
  localparam int unsigned ODEPTH = 4;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;
  typedef enum logic [1:0] {SRC_HM, SRC_DM, SRC_MM} src_e;

  state_e           state;
  send_cmd_t        cmd;
  logic [OFF_W:0]   total;
  logic [OFF_W:0]   iidx;          // next byte to issue
  logic             infl;          // a byte was issued last clock
  src_e             infl_src;
  logic             infl_sop, infl_eop;
  logic [7:0]       mm_q;

  logic             room, can_issue, issue;
  src_e             src;
  logic [OFF_W:0]   doff;
  logic             of_empty, of_full;
  logic [$clog2(ODEPTH):0] of_count;
  logic [9:0]       of_q;
  logic [7:0]       infl_byte;

  assign room = (32'(of_count) + (infl ? 32'd1 : 32'd0)) < ODEPTH;
  assign doff = iidx - (OFF_W+1)'(cmd.hdr_len);

  always_comb begin
    if (iidx < (OFF_W+1)'(cmd.hdr_len)) src = SRC_HM;
    else if (cmd.from_mmf)              src = SRC_MM;
    else                                src = SRC_DM;
  end

  assign can_issue = (state == S_ISSUE) && room && !(src == SRC_MM && mmf_empty[cmd.mmf]);
  assign issue     = can_issue;

  always_comb begin
    hm_en   = issue && src == SRC_HM;
    hm_addr = $clog2(HMEM_BYTES)'(cmd.slot * HDR_SLOT + iidx);
    dm_en   = issue && src == SRC_DM;
    dm_addr = $clog2(DMEM_BYTES)'(cmd.slot * DATA_BUF + doff);
    mmf_rd  = '0;
    if (issue && src == SRC_MM) mmf_rd[cmd.mmf] = 1'b1;
  end

  always_comb begin
    unique case (infl_src)
      SRC_HM:  infl_byte = hm_rdata;
      SRC_DM:  infl_byte = dm_rdata;
      default: infl_byte = mm_q;
    endcase
  end

  sync_fifo #(.WIDTH(10), .DEPTH(ODEPTH)) u_out (
    .clk, .rst_n,
    .wr_en  (infl),
    .wr_data({infl_sop, infl_eop, infl_byte}),
    .rd_en  (out_valid && out_ready),
    .rd_data(of_q),
    .empty  (of_empty),
    .full   (of_full),
    .count  (of_count)
  );

  assign out_valid = !of_empty;
  assign {out_sop, out_eop, out_data} = of_q;
  assign out_cn = cmd.cn;
  assign sq_pop = (state == S_IDLE) && sq_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cmd       <= '0;
      total     <= '0;
      iidx      <= '0;
      infl      <= 1'b0;
      infl_src  <= SRC_HM;
      infl_sop  <= 1'b0;
      infl_eop  <= 1'b0;
      mm_q      <= '0;
      done      <= 1'b0;
      done_slot <= '0;
    end else begin
      done     <= 1'b0;
      infl     <= issue;
      infl_src <= src;
      infl_sop <= (iidx == '0);
      infl_eop <= (iidx == total - 1'b1);
      mm_q     <= mmf_rdata[cmd.mmf];
      unique case (state)
        S_IDLE: if (sq_valid) begin
          cmd   <= sq_cmd;
          total <= (OFF_W+1)'(sq_cmd.hdr_len) + (OFF_W+1)'(sq_cmd.data_len);
          iidx  <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: if (issue) begin
          iidx <= iidx + 1'b1;
          if (iidx == total - 1'b1) state <= S_DRAIN;
        end
        default: if (!infl && of_empty) begin
          done      <= 1'b1;
          done_slot <= cmd.slot;
          state     <= S_IDLE;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) a_no_of_overflow: assert (!(infl && of_full));
  end
endmodule
