// xml_projection: streaming XML projection engine with a query workload
// that can be changed at run time.
//
// Raw XML enters one byte per cycle. The xml_parser annotates every byte
// with a lexical token; the path_engine, a pipelined chain of N_SEG
// runtime-configurable segment matchers, evaluates all configured
// projection paths at once and attaches a match flag; the serializer copies
// the matched parts and re-creates their ancestor tags so the output is a
// well-formed projection of the input. The projection paths arrive in the
// same stream as <?query ...?> processing instructions and take effect for
// the very next byte; <?query reset?> clears them. The structure
// (parser -> chain of segment matchers -> serializer, paths allocated left
// to right, 3-way shared tag RAMs, up to 600 matchers) follows the engine's
// description; the global stall is this design's choice.
//
// Interface: in_valid/in_data/in_ready and out_valid/out_data/out_ready are
// valid/ready byte streams. All stages advance together when the serializer
// can take a byte (adv); while it prints re-created tags or out_ready is
// low, the whole pipeline holds. Latency from input to output is
// N_SEG + 1 advancing cycles for a copied byte.
module xml_projection
  import xp_pkg::*;
#(
  parameter int unsigned N_SEG        = 600,
  parameter int unsigned SHARE        = 3,
  parameter int unsigned TAG_DEPTH    = 512,
  parameter int unsigned HIST_DEPTH   = 32,
  parameter int unsigned TAGMEM_DEPTH = 2048
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready
);

  cooked_t cooked, matched;
  logic    match, adv;

  xml_parser u_parser (
    .clk, .rst, .adv, .in_valid, .in_data, .dout(cooked)
  );

  path_engine #(
    .N_SEG(N_SEG), .SHARE(SHARE), .TAG_DEPTH(TAG_DEPTH), .HIST_DEPTH(HIST_DEPTH)
  ) u_engine (
    .clk, .rst, .adv, .din(cooked), .dout(matched), .match
  );

  serializer #(.TAGMEM_DEPTH(TAGMEM_DEPTH), .STACK_DEPTH(HIST_DEPTH)) u_ser (
    .clk, .rst, .din(matched), .match, .in_ready(adv),
    .out_valid, .out_data, .out_ready
  );

  assign in_ready = adv;

endmodule
