// stream_buffer: small FIFO of weight-activation pairs in front of one MAC lane.
//
// The Hydra controller keeps these buffers filled so that each MAC (or pool
// comparator) always finds its next <W,A> pair ready; filling overlaps with the
// arithmetic. The depth is this design's choice. A push and a pop may happen in
// the same cycle. The head entry is visible on rd_data whenever valid is high
// (first-word fall-through); pop removes it. count reports the occupancy so the
// controller can hold its fetches back before the buffer overflows. Pushing a
// full buffer or popping an empty one is a protocol error (asserted).
module stream_buffer
  import hydra_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     push,
  input  wa_pair_t wr_data,
  input  logic     pop,
  output wa_pair_t rd_data,
  output logic     valid,
  output logic [CW-1:0] count
);

  wa_pair_t         mem [DEPTH];
  logic [PW-1:0]    wp, rp;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

  assign valid   = (count != '0);
  assign rd_data = mem[rp];

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count != CW'(DEPTH)) || pop)
    else $error("stream_buffer: push into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> valid)
    else $error("stream_buffer: pop from an empty buffer");

endmodule
