// event_gen: turns the trigger processor's decisions into read/skip commands.
//
// Trigger words arrive on `trig`: data[11:0] are 12 trigger identification
// bits and data[15:12] a frequency code f. The id bits are ORed into a
// register. A trigger word with at least one id bit whose f matches the
// event counter (the low f bits of the counter are zero, i.e. 1 in 2^f
// events, f=0 always) sets the read flag. When the event's complete word
// arrives (the event boundary has left the processor) a command goes on the
// read bus: read if the flag is set, skip otherwise, held until the ring
// buffers drop cmd_hold. For a read, a
// header follows on `hdr`: a data word with the id bits, then the event's
// track parameter words, then a complete word with the 16-bit event count.
// Then the counter advances and the flag and id bits clear.
// Track parameters arrive on `par` (one block per event, ended by a
// complete). Up to PDEPTH of them are kept, with their own names; further
// ones are dropped. After the parameter complete `par` is held until the
// event is read or skipped, and the event's decision waits for it.
// The scheme (id bits in flip-flops, frequency matched against an event
// counter, track parameters sent along) follows the original event
// generator; the word formats, PDEPTH and the meaning of "frequency" are
// this design's choices.
module event_gen
  import ddp_pkg::*;
#(
  parameter int unsigned PDEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      trig,
  output logic       trig_hold,
  output word_t      hdr,
  input  logic       hdr_hold,
  output logic       cmd_valid,
  output logic       cmd_read,
  input  logic       cmd_hold,
  input  word_t      par,
  output logic       par_hold,
  input  logic [3:0] cfg_hdr_name
);
  localparam int unsigned PW = $clog2(PDEPTH);
  typedef enum logic [2:0] {S_RUN, S_CMD, S_ID, S_PAR, S_CNT} state_e;

  state_e      st;
  logic [11:0] ids;
  logic        flag, can_push, match, push, pc_seen, par_take;
  logic [15:0] evcnt, fmask;
  word_t       res;
  word_t       pmem [PDEPTH];
  logic [PW:0] pcnt, prd;

  always_comb begin
    fmask = (16'd1 << trig.data[15:12]) - 16'd1;
    match = (evcnt & fmask) == 16'd0;
    push  = can_push && (st == S_ID || st == S_CNT || (st == S_PAR && prd != pcnt));
    unique case (st)
      S_ID:    res = mk_word(cfg_hdr_name, {4'd0, ids});
      S_PAR:   res = pmem[prd[PW-1:0]];
      default: res = mk_cmpl(cfg_hdr_name, evcnt);
    endcase
    par_take = par.valid && !pc_seen;
  end

  assign par_hold = !par_take;

  // track parameters of the current event, kept until its read/skip
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pcnt    <= '0;
      pc_seen <= 1'b0;
    end else if ((st == S_CMD && !cmd_hold && !flag) || (st == S_CNT && push)) begin
      pcnt    <= '0;
      pc_seen <= 1'b0;
    end else if (par_take) begin
      if (is_cmpl(par)) pc_seen <= 1'b1;
      else if (pcnt != (PW+1)'(PDEPTH)) begin
        pmem[pcnt[PW-1:0]] <= par;
        pcnt               <= pcnt + 1'b1;
      end
    end
  end

  assign cmd_valid = (st == S_CMD);
  assign cmd_read  = flag;
  assign trig_hold = !(st == S_RUN && is_data(trig)) && !(st == S_CNT && push) &&
                     !(st == S_CMD && !cmd_hold && !flag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= S_RUN;
      ids   <= '0;
      flag  <= 1'b0;
      evcnt <= '0;
      prd   <= '0;
    end else begin
      unique case (st)
        S_RUN: if (is_data(trig)) begin
          ids <= ids | trig.data[11:0];
          if (match && |trig.data[11:0]) flag <= 1'b1;
        end else if (is_cmpl(trig) && pc_seen) st <= S_CMD;
        S_CMD: if (!cmd_hold) begin
          if (flag) st <= S_ID;
          else begin
            st    <= S_RUN;
            evcnt <= evcnt + 1'b1;
            ids   <= '0;
          end
        end
        S_ID: if (push) begin
          st  <= S_PAR;
          prd <= '0;
        end
        S_PAR: if (prd == pcnt) st <= S_CNT;
               else if (push) prd <= prd + 1'b1;
        default: if (push) begin
          st    <= S_RUN;
          evcnt <= evcnt + 1'b1;
          ids   <= '0;
          flag  <= 1'b0;
        end
      endcase
    end
  end

  ddp_outreg u_out (.clk, .rst_n, .d(res), .push, .can_push, .out(hdr), .out_hold(hdr_hold));
endmodule
