// tb_mem_arbiter -- self-checking test of mem_arbiter with three clients and
// a small memory behind it (gse_memory, AW=8).
//
// Each client runs random write/read sequences on its own slice of memory
// and keeps a private copy of what it wrote; every read must return that
// copy, flagged by c_rvalid for that client only, one cycle after the grant.
// The test also counts grants under full contention to check that no client
// waits more than N-1 cycles while requesting (round robin).
module tb_mem_arbiter;
  import gse_pkg::*;
  localparam int N = 3;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     [N-1:0] c_req, c_gnt, c_rvalid;
  mem_req_t [N-1:0] c_cmd;
  logic [31:0]      c_rdata;
  logic              m_req, m_we;
  logic [MEM_AW-1:0] m_addr;
  logic [31:0]       m_wdata, m_rdata;

  mem_arbiter #(.N(N)) dut (.clk, .rst_n, .c_req, .c_cmd, .c_gnt, .c_rvalid, .c_rdata,
                            .m_req, .m_we, .m_addr, .m_wdata, .m_rdata);
  gse_memory #(.AW(AW)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr[AW-1:0]),
                               .wdata(m_wdata), .rdata(m_rdata));

  int wait_max = 0;
  int done_cnt = 0;

  for (genvar c = 0; c < N; c++) begin : g_cl
    logic [31:0] shadow [16];
    logic [15:0] written;
    int waitc;
    initial begin
      c_req[c] = 0; c_cmd[c] = '0; written = 0; waitc = 0;
      wait (rst_n);
      for (int i = 0; i < 200; i++) begin
        int k; logic wr;
        @(negedge clk);
        k = $urandom_range(0, 15);
        wr = ($urandom_range(0, 1) == 1) || !written[k];
        c_req[c] = 1;
        c_cmd[c].we = wr;
        c_cmd[c].addr = MEM_AW'(c * 16 + k);
        c_cmd[c].wdata = $urandom;
        waitc = 0;
        #1;
        while (!c_gnt[c]) begin @(negedge clk); #1; waitc++; end
        if (waitc > wait_max) wait_max = waitc;
        if (wr) begin shadow[k] = c_cmd[c].wdata; written[k] = 1; end
        @(negedge clk);
        c_req[c] = 0;
        if (!wr) begin
          checks++;
          if (!c_rvalid[c] || c_rdata !== shadow[k]) begin
            failures++;
            $display("FAIL client %0d addr %0d got %h exp %h rv=%b", c, k, c_rdata, shadow[k], c_rvalid[c]);
          end
        end
      end
      done_cnt++;
    end
  end

  // rvalid only for the client granted a read one cycle earlier
  logic [N-1:0] rd_gnt_d;
  always @(posedge clk) begin
    if (rst_n) begin
      if (c_rvalid !== rd_gnt_d) begin failures++; $display("FAIL rvalid %b exp %b", c_rvalid, rd_gnt_d); end
    end
    for (int c = 0; c < N; c++) rd_gnt_d[c] <= c_gnt[c] && !c_cmd[c].we;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done_cnt == N);
    checks++;
    if (wait_max > N - 1) begin failures++; $display("FAIL a client waited %0d cycles", wait_max); end
    $display("longest wait %0d cycles", wait_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
