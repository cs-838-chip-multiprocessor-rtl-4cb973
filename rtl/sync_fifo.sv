// sync_fifo: single-clock first-in first-out queue.
//
// Used for each of the chip's queues: the L1-to-L2 request queue, the prefetch request
// queue, the L2-to-directory request queue and the incoming response queue. Entries are
// WIDTH-bit words held in a DEPTH-entry circular buffer. The head word is visible on
// rd_data whenever rd_valid is high and is removed by rd_pop; wr_push offers a word,
// which is taken in a cycle where wr_ready is high (valid/ready). A push and a pop may
// happen in the same cycle, including on a full queue. Data written in one cycle is readable from the next. The queue names come from
// the chip diagram; the depth (8) and the valid/ready handshake are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_push,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_ready,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_pop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign rd_valid = (count != '0);
  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || rd_pop;
  assign rd_data  = mem[rd_ptr];
  assign do_push  = wr_push && wr_ready;
  assign do_pop   = rd_pop && rd_valid;

  function automatic logic [PW-1:0] bump(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= bump(wr_ptr);
      if (do_pop)  rd_ptr <= bump(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  // The write side is a valid/ready pair: a push offered while wr_ready is low is not
  // taken and must be offered again. Popping an empty queue is a protocol error.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid);
endmodule
