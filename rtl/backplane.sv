// backplane: stream crossbar that connects the nodes of the engine.
//
// Every node (the PE of each Core and the Data Stream Switch) has one
// stream input and one stream output. The host programs, for each output
// port, which input port feeds it (route_src) and whether the route is
// open (route_en); any number of routes can be open at once, and one input
// may feed several outputs, which then all receive the same stream (data
// reuse without touching the shared memory). An input word moves only when
// every output it feeds can take it.
//
// Each output has a one-word register stage, so output valid never depends
// on output ready and the crossbar adds one cycle of latency; throughput
// is one word per cycle per route.
module backplane
  import hs_pkg::*;
#(
  parameter int unsigned P  = 17,
  parameter int unsigned IW = $clog2(P)
) (
  input  logic          clk,
  input  logic          rst_n,
  // routing table
  input  logic [IW-1:0] route_src [P],
  input  logic [P-1:0]  route_en,
  // node -> crossbar
  input  data_t         in_data  [P],
  input  logic [P-1:0]  in_valid,
  output logic [P-1:0]  in_ready,
  // crossbar -> node
  output data_t         out_data [P],
  output logic [P-1:0]  out_valid,
  input  logic [P-1:0]  out_ready
);
  logic [P-1:0] slot_free;    // output stage can take a word this cycle
  logic [P-1:0] move;         // input i transfers this cycle
  logic [P-1:0] has_dest;
  logic [P-1:0] v_q;
  data_t        d_q [P];

  for (genvar o = 0; o < P; o++) begin : g_free
    assign slot_free[o] = !v_q[o] || out_ready[o];
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      in_ready[i] = 1'b1;
      has_dest[i] = 1'b0;
      for (int o = 0; o < P; o++)
        if (route_en[o] && int'(route_src[o]) == i) begin
          has_dest[i] = 1'b1;
          if (!slot_free[o]) in_ready[i] = 1'b0;
        end
      in_ready[i] = in_ready[i] && has_dest[i];
      move[i]     = in_ready[i] && in_valid[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else for (int o = 0; o < P; o++) begin
      if (route_en[o] && move[route_src[o]]) v_q[o] <= 1'b1;
      else if (out_ready[o])                 v_q[o] <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    for (int o = 0; o < P; o++)
      if (route_en[o] && move[route_src[o]]) d_q[o] <= in_data[route_src[o]];

  assign out_data  = d_q;
  assign out_valid = v_q;
endmodule
