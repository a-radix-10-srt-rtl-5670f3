// mux_latch: wide one-hot multiplexer merged with a storage element.
//
// The divider stores every operand behind a high fan-in multiplexer (the
// document places its registers after the multiplexers so that the
// mux-latch circuit can absorb the selection delay). Here it is an AND-OR
// multiplexer in front of an edge-triggered register: on a clock edge with
// en = 1 the register takes the OR of the inputs whose select bit is set,
// which is zero when no bit is set (used to load a zero multiple). sel must
// be one-hot or zero when en is 1 (checked by an assertion). Synchronous
// active-low reset to zero.
module mux_latch #(
  parameter int unsigned WIDTH = 70,
  parameter int unsigned NIN   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [NIN-1:0]   sel,
  input  logic [WIDTH-1:0] din [NIN],
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mux;

  always_comb begin
    mux = '0;
    for (int i = 0; i < NIN; i++)
      if (sel[i]) mux = mux | din[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= mux;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) en |-> $onehot0(sel));
endmodule
