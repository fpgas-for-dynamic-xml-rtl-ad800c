// serializer: turns the matched parts of the cooked stream into a
// well-formed projected XML document.
//
// The match flag from the path engine says, per byte, whether the byte
// lies in a region some projection path wants. Copying only those bytes
// would lose the ancestors of matched nodes, so the serializer keeps the
// names of all currently open elements in a tag RAM (tagmem) and a stack of
// name end pointers, one per open level. It tracks two levels: cur, the
// depth of the input, and prt, how many of those open elements have been
// written to the output. Before a matched byte is copied, the missing
// ancestors prt+1..cur are printed from tagmem as "<name>"; when an element
// closes that was printed but whose closing tag is not copied, "</name>" is
// printed. Attributes of re-created tags are not reproduced.
// Tag markup is copied as a whole or not at all: the flag at the '<' of a
// tag decides for all its bytes (raw). An empty-element tag "<x/>" that
// matches itself but whose parent does not is written as "<x></x>".
// The recording of opening tag names, the level counters and the printing
// of missing opening and closing tags follow the engine's serialization
// algorithm; the raw-tag rule, the empty-element handling and the stall
// handshake are this design's.
//
// Interface and timing: din/match are taken when din.valid and in_ready.
// While tags are being printed (one byte per cycle) or out_ready is low,
// in_ready is low and the whole engine stalls. out_valid/out_data form a
// valid/ready stream with out_ready; out_data is combinational from the
// current input byte or the print state.
module serializer
  import xp_pkg::*;
#(
  parameter int unsigned TAGMEM_DEPTH = 2048,
  parameter int unsigned STACK_DEPTH  = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  cooked_t    din,
  input  logic       match,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready
);

  localparam int MW = $clog2(TAGMEM_DEPTH);
  localparam int LW = $clog2(STACK_DEPTH + 1);

  typedef enum logic [2:0] {
    P_IDLE, P_OPEN_LT, P_OPEN_NAME, P_OPEN_GT,
    P_CLOSE_LT, P_CLOSE_SLASH, P_CLOSE_NAME, P_CLOSE_GT
  } pstate_e;

  pstate_e       ps_q;
  logic [7:0]    tagmem [TAGMEM_DEPTH];
  logic [MW-1:0] ends_q [STACK_DEPTH+1];   // end of level L's name; ends_q[0] = 0
  logic [MW-1:0] mempos_q;
  logic [LW-1:0] cur_q, prt_q, lvl_q;
  logic          opening_q, raw_q, close_done_q;
  logic [MW-1:0] rd_ptr_q, rd_next;
  logic [7:0]    rdata_q;

  logic in_tag, raw_eff, copy, empty_own, need_flush, need_close, consume;
  logic accept;

  assign in_tag     = (din.tok != TK_TEXT);
  assign raw_eff    = (din.tok == TK_TAGSTART) ? match : raw_q;
  assign copy       = in_tag ? raw_eff : match;
  assign empty_own  = (din.tok == TK_EMPTYTAGEND) && !raw_q && match;
  assign need_flush = din.valid && (copy || empty_own) && (prt_q < cur_q);
  assign need_close = din.valid && tok_pop(din.tok) && !raw_q && (prt_q == cur_q) &&
                      (cur_q != '0) && !close_done_q;

  always_comb begin
    out_valid = 1'b0;
    out_data  = din.ch;
    in_ready  = 1'b0;
    unique case (ps_q)
      P_IDLE: begin
        if (!need_flush && !need_close) begin
          out_valid = din.valid && copy;
          in_ready  = !(din.valid && copy) || out_ready;
        end
      end
      P_OPEN_LT, P_CLOSE_LT: begin out_valid = 1'b1; out_data = "<"; end
      P_CLOSE_SLASH:         begin out_valid = 1'b1; out_data = "/"; end
      P_OPEN_NAME, P_CLOSE_NAME: begin out_valid = 1'b1; out_data = rdata_q; end
      P_OPEN_GT, P_CLOSE_GT: begin out_valid = 1'b1; out_data = ">"; end
      default: ;
    endcase
  end

  assign accept  = out_valid && out_ready;
  assign consume = (ps_q == P_IDLE) && din.valid && in_ready;

  // read pointer of the tag RAM while printing
  always_comb begin
    rd_next = rd_ptr_q;
    unique case (ps_q)
      P_IDLE:
        if (need_flush) rd_next = ends_q[prt_q];           // start of level prt+1
        else if (need_close) rd_next = ends_q[cur_q - 1'b1]; // start of level cur
      P_OPEN_NAME, P_CLOSE_NAME:
        if (accept) rd_next = rd_ptr_q + 1'b1;
      P_OPEN_GT:
        if (accept && lvl_q < cur_q) rd_next = ends_q[lvl_q];
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    rd_ptr_q <= rd_next;
    rdata_q  <= tagmem[rd_next];
    if (consume && din.tok == TK_TAGNAMECHAR && opening_q)
      tagmem[mempos_q] <= din.ch;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ps_q         <= P_IDLE;
      mempos_q     <= '0;
      cur_q        <= '0;
      prt_q        <= '0;
      lvl_q        <= '0;
      opening_q    <= 1'b0;
      raw_q        <= 1'b0;
      close_done_q <= 1'b0;
      for (int i = 0; i <= STACK_DEPTH; i++) ends_q[i] <= '0;
    end else begin
      unique case (ps_q)
        P_IDLE: begin
          if (need_flush) begin
            lvl_q <= prt_q + 1'b1;
            ps_q  <= P_OPEN_LT;
          end else if (need_close) begin
            ps_q <= P_CLOSE_LT;
          end else if (consume) begin
            unique case (din.tok)
              TK_TAGSTART: begin
                opening_q <= 1'b1;
                raw_q     <= match;
              end
              TK_CLOSINGTAGSLASH: opening_q <= 1'b0;
              TK_TAGNAMECHAR:
                if (opening_q && mempos_q != MW'(TAGMEM_DEPTH - 1)) mempos_q <= mempos_q + 1'b1;
              TK_OPENINGTAGEND, TK_EMPTYTAGSLASH:
                if (cur_q != LW'(STACK_DEPTH)) begin
                  ends_q[cur_q + 1'b1] <= mempos_q;
                  cur_q <= cur_q + 1'b1;
                  if (raw_q) prt_q <= prt_q + 1'b1;
                end
              TK_CLOSINGTAGEND, TK_EMPTYTAGEND:
                if (cur_q != '0) begin
                  if (prt_q == cur_q) prt_q <= prt_q - 1'b1;
                  cur_q        <= cur_q - 1'b1;
                  mempos_q     <= ends_q[cur_q - 1'b1];
                  close_done_q <= 1'b0;
                end
              default: ;
            endcase
          end
        end
        P_OPEN_LT:   if (accept) ps_q <= P_OPEN_NAME;
        P_OPEN_NAME: if (accept && rd_ptr_q + 1'b1 == ends_q[lvl_q]) ps_q <= P_OPEN_GT;
        P_OPEN_GT:
          if (accept) begin
            prt_q <= lvl_q;
            if (lvl_q < cur_q) begin
              lvl_q <= lvl_q + 1'b1;
              ps_q  <= P_OPEN_LT;
            end else ps_q <= P_IDLE;
          end
        P_CLOSE_LT:    if (accept) ps_q <= P_CLOSE_SLASH;
        P_CLOSE_SLASH: if (accept) ps_q <= P_CLOSE_NAME;
        P_CLOSE_NAME:  if (accept && rd_ptr_q + 1'b1 == ends_q[cur_q]) ps_q <= P_CLOSE_GT;
        P_CLOSE_GT:
          if (accept) begin
            close_done_q <= 1'b1;
            ps_q         <= P_IDLE;
          end
        default: ps_q <= P_IDLE;
      endcase
    end
  end

endmodule
