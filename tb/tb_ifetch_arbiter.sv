// tb_ifetch_arbiter: self-checking test of the instruction fetch arbiter.
//
// Eight requesters raise fetch requests at random and hold each one, with a
// fixed address, until it is accepted, as the sub modules do. The cache side
// raises ARREADY at random. A reference model predicts which requester the
// round-robin order serves next, checks that a request waiting for ARREADY does
// not change, that each accept pulse reaches exactly the served requester, and
// that every request is served exactly once. Responses are checked to reach
// the even or the odd response port by the parity of their CTXID.
module tb_ifetch_arbiter;
  import ws_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req [N];
  logic [PC_W-1:0] addr [N];
  logic accept [N];
  resp_t resp [2];
  logic arvalid, arready, rvalid;
  logic [PC_W-1:0] araddr, raddr;
  logic [WID_W-1:0] arctxid, rctxid;
  logic [LINE_W-1:0] rdata;

  ifetch_arbiter #(.N(N)) dut (.*);

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, wait_idx, served, raised, n_contend, n_bp, n_skip;
    last = N - 1; wait_idx = -1; served = 0; raised = 0;
    n_contend = 0; n_bp = 0; n_skip = 0;
    for (int k = 0; k < N; k++) begin req[k] = 0; addr[k] = 0; end
    arready = 0; rvalid = 0; raddr = 0; rctxid = 0; rdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int it = 0; it < 5000; it++) begin
      int exp_i, nreq;
      // new requests (held until accepted)
      for (int k = 0; k < N; k++)
        if (!req[k] && $urandom_range(0, 5) == 0) begin
          req[k] = 1; addr[k] = {$urandom, 4'b0}; raised++;
        end
      arready = ($urandom_range(0, 2) != 0);
      // a response
      rvalid = ($urandom_range(0, 1) == 1);
      rctxid = WID_W'($urandom_range(0, N - 1));
      raddr = $urandom; rdata = {$urandom, $urandom, $urandom, $urandom};
      #1;
      nreq = 0;
      for (int k = 0; k < N; k++) nreq += req[k];
      if (nreq > 1) n_contend++;
      if (wait_idx >= 0) exp_i = wait_idx;
      else begin
        exp_i = -1;
        for (int j = 1; j <= N; j++)
          if (exp_i < 0 && req[(last + j) % N]) exp_i = (last + j) % N;
        if (exp_i >= 0 && exp_i != (last + 1) % N) n_skip++;
      end
      check("arvalid", arvalid, exp_i >= 0);
      if (exp_i >= 0) begin
        check("arctxid", arctxid, exp_i);
        check("araddr", araddr, addr[exp_i]);
      end
      for (int k = 0; k < N; k++) check("accept", accept[k], exp_i == k && arready);
      for (int p = 0; p < 2; p++) begin
        check("resp valid", resp[p].valid, rvalid && (rctxid % 2 == p));
        if (resp[p].valid) begin
          check("resp ctxid", resp[p].ctxid, rctxid);
          check("resp addr", resp[p].addr, raddr);
          check("resp data", resp[p].data, rdata);
        end
      end
      @(posedge clk); #1;
      if (exp_i >= 0) begin
        if (arready) begin
          req[exp_i] = 0; served++; last = exp_i; wait_idx = -1;
        end else begin
          wait_idx = exp_i; n_bp++;
        end
      end
    end
    // drain
    arready = 1;
    for (int it = 0; it < 2 * N; it++) begin
      #1;
      for (int k = 0; k < N; k++) if (accept[k]) begin req[k] = 0; served++; end
      @(posedge clk); #1;
    end
    check("every request served once", served, raised);
    $display("raised=%0d contended=%0d backpressure=%0d skips=%0d", raised, n_contend, n_bp, n_skip);
    check("mechanisms exercised", n_contend > 0 && n_bp > 0 && n_skip > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
