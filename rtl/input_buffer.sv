// Command input buffer.
//
// Holds the command packets delivered by the communication interface until
// the controller executes them. Words enter with a valid/ready handshake;
// in_last marks the final word of a packet. The buffer is a first-word-
// fall-through FIFO of DEPTH words that also counts the complete packets it
// holds: the controller sees words (rd_valid) only while at least one whole
// packet is stored, because, as with a packet link whose checksum is checked
// at the end, a command list is executed only once it has fully arrived.
// Storing the packet and feeding it to the controller follows the concept;
// the FIFO organisation, the depth and the handshake are this design's
// choice. A packet must not be longer than DEPTH words (it could never
// complete). rd_data/rd_last show the head word; rd_en pops it in the same
// cycle. Reset empties the buffer.
module input_buffer
  import ctrl_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the communication interface
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  // to the controller
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_last,
  input  logic              rd_en
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [DATA_W:0] mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [CW-1:0]   count;
  logic [CW-1:0]   pkt_count;  // complete packets stored
  logic            push, pop;

  assign in_ready = (count != CW'(DEPTH));
  assign push     = in_valid && in_ready;
  assign rd_valid = (pkt_count != '0);
  assign pop      = rd_en && rd_valid;
  assign {rd_last, rd_data} = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= {in_last, in_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      pkt_count <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count     <= count + CW'(push) - CW'(pop);
      pkt_count <= pkt_count + CW'(push && in_last) - CW'(pop && rd_last);
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> rd_valid);

endmodule
