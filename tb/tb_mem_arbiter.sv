// tb_mem_arbiter: self-checking test of the global-memory arbiter.
//
// Three requesters issue random reads and writes, each to its own address
// range, into the memory model (with random backpressure).  Each requester
// checks that the read data it receives is, in order, the data at the
// addresses it asked for (known from its own writes or the model's initial
// contents), and that no requester waits more than a few cycles while the
// others keep the port busy (round-robin fairness).
`timescale 1ns/1ps
module tb_mem_arbiter;
  import hobbes_pkg::*;

  localparam int unsigned N = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] s_req_valid, s_req_ready, s_rsp_valid;
  mem_req_t     s_req [N];
  field_t       s_rsp_data;
  logic         m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t     m_req;
  field_t       m_rsp_data;

  mem_arbiter #(.N(N), .RT_DEPTH(4)) dut (.clk, .rst_n, .s_req_valid, .s_req_ready, .s_req,
    .s_rsp_valid, .s_rsp_data, .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp_data);

  ddr_model #(.LAT(6), .STALL_PCT(20)) u_mem (.clk, .rst_n, .req_valid(m_req_valid),
    .req_ready(m_req_ready), .req(m_req), .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  field_t shadow [maddr_t];      // what each address should hold
  field_t expect_q [N][$];       // read data each requester expects
  int     issued [N], received [N], wait_cyc [N], max_wait [N];
  localparam int unsigned OPS = 300;

  function automatic field_t value_at(maddr_t a);
    return shadow.exists(a) ? shadow[a] : u_mem.init_word(a);
  endfunction

  // each requester: a new random request whenever the last one was taken
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (!rst_n) s_req_valid[i] <= 1'b0;
      else if (!s_req_valid[i] && issued[i] < OPS) begin
        mem_req_t r;
        r.we    = ($urandom_range(2) == 0);
        r.addr  = maddr_t'(i * 64 + $urandom_range(15));
        r.wdata = {16{$urandom()}};
        s_req[i]       <= r;
        s_req_valid[i] <= 1'b1;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (s_rsp_valid[i]) begin
          check(expect_q[i].size() > 0, $sformatf("requester %0d: unexpected data", i));
          if (expect_q[i].size() > 0) begin
            check(s_rsp_data == expect_q[i][0], $sformatf("requester %0d: read data %0d", i, received[i]));
            void'(expect_q[i].pop_front());
          end
          received[i]++;
        end
        if (s_req_valid[i] && s_req_ready[i]) begin
          if (s_req[i].we) shadow[s_req[i].addr] = s_req[i].wdata;
          else expect_q[i].push_back(value_at(s_req[i].addr));
          issued[i]++;
          s_req_valid[i] <= 1'b0;
          wait_cyc[i] = 0;
        end else if (s_req_valid[i]) begin
          wait_cyc[i]++;
          if (wait_cyc[i] > max_wait[i]) max_wait[i] = wait_cyc[i];
        end
      end
      check($countones(s_req_ready) <= 1, "at most one requester granted");
    end
  end

  initial begin
    s_req_valid = '0;
    foreach (issued[i]) begin issued[i] = 0; received[i] = 0; wait_cyc[i] = 0; max_wait[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (issued[0] < OPS || issued[1] < OPS || issued[2] < OPS) @(posedge clk);
    repeat (40) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(expect_q[i].size() == 0, $sformatf("requester %0d got all its reads", i));
      check(max_wait[i] <= 30, $sformatf("requester %0d waited at most %0d cycles", i, max_wait[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
