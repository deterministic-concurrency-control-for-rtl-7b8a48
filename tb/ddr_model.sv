// ddr_model: behavioural model of the board's global memory (DDR3 and its
// controller) for simulation only.
//
// Whole 512-bit words, one request accepted per cycle when req_ready is high.
// Writes take effect when accepted.  Reads return after LAT cycles, in
// request order.  With STALL_PCT > 0, req_ready drops at random to mimic a
// busy controller.  Storage is sparse; a word never written reads as
// init_word(addr), a fixed function that testbenches can recompute.
module ddr_model
  import hobbes_pkg::*;
#(
  parameter int unsigned LAT       = 8,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output field_t   rsp_data
);
  field_t store [maddr_t];
  typedef struct { longint due; field_t data; } pend_t;
  pend_t pending [$];
  longint cycle;
  longint n_reads, n_writes, n_stall;

  function automatic field_t init_word(maddr_t a);
    field_t w;
    for (int i = 0; i < FIELD_W / 32; i++) w[i*32 +: 32] = (32'(a) * 32'h9E37_79B1) ^ 32'(i);
    return w;
  endfunction

  function automatic field_t peek(maddr_t a);
    return store.exists(a) ? store[a] : init_word(a);
  endfunction

  function automatic void poke(maddr_t a, field_t d);
    store[a] = d;
  endfunction

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_data  = '0;
    cycle = 0; n_reads = 0; n_writes = 0; n_stall = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst_n) begin
      pending.delete();
      rsp_valid <= 1'b0;
      req_ready <= 1'b0;
    end else begin
      if (req_valid && req_ready) begin
        if (req.we) begin
          store[req.addr] = req.wdata;
          n_writes++;
        end else begin
          pending.push_back('{due: cycle + longint'(LAT), data: peek(req.addr)});
          n_reads++;
        end
      end else if (req_valid) n_stall++;
      if (pending.size() > 0 && pending[0].due <= cycle) begin
        rsp_valid <= 1'b1;
        rsp_data  <= pending[0].data;
        void'(pending.pop_front());
      end else begin
        rsp_valid <= 1'b0;
      end
      req_ready <= ($urandom_range(99) >= STALL_PCT);
    end
  end
endmodule
