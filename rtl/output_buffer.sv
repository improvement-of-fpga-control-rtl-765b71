// Response output buffer and packet builder.
//
// Collects the words the controller produces (read data, status records,
// exception records) and sends them to the communication interface as one
// response packet. As the concept requires, a packet is sent when the buffer
// is full or when the controller asks for it (an exception, a SYNC command,
// the end of the command list, or every command in standard mode). Every
// packet ends with a trailer word (ctrl_pkg::trailer_t) built here from the
// flush request: its kind, exception code and command index tell the host
// why the packet was sent; the trailer is this design's choice.
//
// Write side: wr_en/wr_data store a word while full is low; full is also
// high while a packet is being sent. Flush side: hold flush_req with
// flush_kind/flush_exc/flush_index until flush_ack pulses. When DEPTH words
// are stored and no flush is requested, a PKT_FULL packet with index
// cur_index is sent on its own. Output side: out_valid/out_ready stream,
// out_last on the trailer. A packet of n stored words takes n+1 accepted
// output cycles; the buffer takes new words again the cycle after the
// trailer leaves.
module output_buffer
  import ctrl_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the controller
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  output logic              full,
  input  logic              flush_req,
  input  pkt_kind_e         flush_kind,
  input  exc_e              flush_exc,
  input  logic [23:0]       flush_index,
  output logic              flush_ack,
  input  logic [23:0]       cur_index,
  // to the communication interface
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {S_FILL, S_DRAIN, S_TRAILER} state_e;

  state_e            state;
  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic [CW-1:0]     count;
  trailer_t          trailer;
  logic              auto_flush;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  assign full       = (state != S_FILL) || (count == CW'(DEPTH));
  assign auto_flush = (state == S_FILL) && (count == CW'(DEPTH)) && !flush_req;
  assign flush_ack  = (state == S_FILL) && flush_req;

  assign out_valid = (state != S_FILL);
  assign out_last  = (state == S_TRAILER);
  assign out_data  = (state == S_TRAILER) ? DATA_W'(trailer) : mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FILL;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      count   <= '0;
      trailer <= '0;
    end else begin
      unique case (state)
        S_FILL: begin
          if (wr_en && !full) begin
            wr_ptr <= next_ptr(wr_ptr);
            count  <= count + CW'(1);
          end
          if (flush_req) begin
            trailer <= '{kind: flush_kind, exc: flush_exc, index: flush_index};
            state   <= (count == '0) ? S_TRAILER : S_DRAIN;
          end else if (auto_flush) begin
            trailer <= '{kind: PKT_FULL, exc: EXC_NONE, index: cur_index};
            state   <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (out_ready) begin
            rd_ptr <= next_ptr(rd_ptr);
            count  <= count - CW'(1);
            if (count == CW'(1)) state <= S_TRAILER;
          end
        end
        S_TRAILER: begin
          if (out_ready) state <= S_FILL;
        end
        default: state <= S_FILL;
      endcase
    end
  end

  // The controller must not write into the same cycle it asks for a flush.
  a_no_write_with_flush: assert property (@(posedge clk) disable iff (!rst_n)
                                          flush_req |-> !wr_en);

endmodule
