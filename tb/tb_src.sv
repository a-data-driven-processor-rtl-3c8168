// tb_src: testbench cable source. Words queued with push() are sent in
// order; GAP_PCT percent of the cycles offer an empty word instead, and a
// word stays on the cable unchanged while the destination holds it.
module tb_src
  import ddp_pkg::*;
#(
  parameter int GAP_PCT = 30
) (
  input  logic  clk,
  input  logic  rst_n,
  output word_t out,
  input  logic  hold
);
  word_t q[$];
  int    sent = 0;
  int    held = 0;

  function automatic void push(word_t w);
    q.push_back(w);
  endfunction

  function automatic int pending();
    return q.size() + int'(out.valid);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) out <= EMPTY_WORD;
    else begin
      if (out.valid && hold) held++;
      if (!out.valid || !hold) begin
        if (out.valid) sent++;
        if (q.size() > 0 && $urandom_range(99) >= GAP_PCT) out <= q.pop_front();
        else out <= EMPTY_WORD;
      end
    end
  end
endmodule
