// dio_ip: digital input/output IP with edge interrupts and press-time
// counters, AXI4-Lite control.
//
// Inputs din[7:0] are general buttons; din[8] and din[9] (the description's
// inputs 9 and 10) are counted inputs. All ten pass a two-flop
// synchroniser. Registers (word index):
//   0  bits 25:16 interrupt flags, bits 15:8 digital output (read/write),
//      bits 7:0 state of the general inputs (read only)
//   1  press time of input 9, in clocks
//   2  press time of input 10, in clocks
// Flag n (n = 0..7, register bit 16+n) is set by either edge of general
// input n. Flags 8 and 9 (bits 24, 25) are set when counted input 9 or 10
// is released; in the same clock the number of clocks it was held high is
// stored in register 1 or 2 (saturating at 2^32-1). Writing 1 to a flag
// clears it; a new event in the same clock wins over the clear. irq is the
// OR of the ten flags, so it stays high until software has cleared them
// all. dout drives the output pins from register 0 bits 15:8.
//
// Follows the description: 8 general and 2 counted inputs, Table 4 bit
// fields, interrupts on both edges of the general inputs and on the falling
// edge of the counted ones with the count saved then, and the OR of ten
// interrupt flags into one line. The output register is eight bits wide as
// in Table 4 (the text also speaks of one output). Clear-by-writing-1,
// counting in clock cycles and the synchroniser are this design's choices.
module dio_ip
  import aio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_axi_req,
  output axil_rsp_t   s_axi_rsp,
  input  logic [9:0]  din,
  output logic [7:0]  dout,
  output logic        irq
);

  logic                  wr_en, rd_en;
  logic [AXI_ADDR_W-3:0] wr_idx, rd_idx;
  logic [31:0]           wr_data, rd_data;
  logic [3:0]            wr_strb;

  axil_slave u_axi (
    .clk, .rst_n, .req(s_axi_req), .rsp(s_axi_rsp),
    .wr_en, .wr_idx, .wr_data, .wr_strb, .rd_en, .rd_idx, .rd_data
  );

  logic [9:0]  sync1, sync2, prev;
  logic [9:0]  flags, event_set, clr;
  logic [7:0]  out_q;
  logic [31:0] run_cnt  [2];
  logic [31:0] held_cnt [2];

  wire ctrl_wr = wr_en && (wr_idx == DIO_REG_CTRL);

  always_comb begin
    event_set[7:0] = sync2[7:0] ^ prev[7:0];        // either edge
    event_set[9:8] = prev[9:8] & ~sync2[9:8];       // release of a counted input
    clr            = '0;
    if (ctrl_wr) begin
      clr[7:0] = wr_strb[2] ? wr_data[23:16] : 8'h0;
      clr[9:8] = wr_strb[3] ? wr_data[25:24] : 2'h0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
      prev  <= '0;
      flags <= '0;
      out_q <= '0;
      for (int j = 0; j < 2; j++) begin
        run_cnt[j]  <= '0;
        held_cnt[j] <= '0;
      end
    end else begin
      sync1 <= din;
      sync2 <= sync1;
      prev  <= sync2;
      flags <= (flags & ~clr) | event_set;
      if (ctrl_wr && wr_strb[1]) out_q <= wr_data[15:8];
      for (int j = 0; j < 2; j++) begin
        if (sync2[8+j]) begin
          if (run_cnt[j] != '1) run_cnt[j] <= run_cnt[j] + 1'b1;
        end else begin
          run_cnt[j] <= '0;
        end
        if (event_set[8+j]) held_cnt[j] <= run_cnt[j];
      end
    end
  end

  assign dout = out_q;
  assign irq  = |flags;

  always_comb begin
    rd_data = '0;
    unique case (rd_idx)
      DIO_REG_CTRL:  rd_data = {6'h0, flags, out_q, sync2[7:0]};
      DIO_REG_CNT9:  rd_data = held_cnt[0];
      DIO_REG_CNT10: rd_data = held_cnt[1];
      default:       rd_data = '0;
    endcase
  end

endmodule
