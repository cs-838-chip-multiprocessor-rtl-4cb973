// dir_mem_model: behavioural stand-in for everything beyond the chip's L2 (home
// directory, memory controller, links to the other chips). Not synthesizable.
//
// It accepts every request from the L2-to-directory queue (ready is always high). GETS,
// GETX and PREFETCH requests are answered with the line address on rsp_valid/rsp_addr
// after LAT cycles; the default of 400 is the 200-cycle directory lookup followed by the
// 200-cycle memory access, since the directory is held in memory. PUTX (write-back) needs
// no answer. Answers are given in request order, one per cycle when rsp_ready is high.
// It counts the requests of each type for the testbench.
module dir_mem_model
  import cmp_pf_pkg::*;
#(
  parameter int LAT = 400
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  dir_req_t   req,
  output logic       req_ready,
  output logic       rsp_valid,
  output line_addr_t rsp_addr,
  input  logic       rsp_ready,
  output int         n_gets,
  output int         n_getx,
  output int         n_prefetch,
  output int         n_putx
);
  longint     now;
  line_addr_t pend_addr [$];
  longint     pend_due  [$];

  assign req_ready = 1'b1;
  assign rsp_valid = (pend_due.size() != 0) && (pend_due[0] <= now);
  assign rsp_addr  = (pend_addr.size() != 0) ? pend_addr[0] : '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now = 0;
      n_gets = 0; n_getx = 0; n_prefetch = 0; n_putx = 0;
      pend_addr.delete();
      pend_due.delete();
    end else begin
      if (rsp_valid && rsp_ready) begin
        void'(pend_addr.pop_front());
        void'(pend_due.pop_front());
      end
      if (req_valid) begin
        case (req.rtype)
          DIR_GETS:     n_gets++;
          DIR_GETX:     n_getx++;
          DIR_PREFETCH: n_prefetch++;
          default:      n_putx++;
        endcase
        if (req.rtype != DIR_PUTX) begin
          pend_addr.push_back(req.addr);
          pend_due.push_back(now + longint'(LAT));
        end
      end
      now = now + 1;
    end
  end
endmodule
