// tb_main_bus: six masters hammer the shared bus with random reads and writes to
// their own SDRAM regions and to the semaphore registers. Checks: every read
// returns what a shadow copy predicts, every write lands in the memory, every
// master is served within the round-robin bound (at most five other transfers
// between its request and its ack), semaphore takes exclude each other, and an
// idle-bus semaphore access is acknowledged two cycles after the request.
module tb_main_bus;
  import codec_pkg::*;
  localparam int N = 6, LAT = 3;
  logic clk = 0, rst_n = 0;
  bus_req_t m_req [N];
  bus_rsp_t m_rsp [N];
  bus_req_t mem_req;
  bus_rsp_t mem_rsp;
  logic [15:0] sem_locked;
  logic [N-1:0] gs;
  int checks = 0, failures = 0;
  int done_cnt = 0;
  int starts = 0;

  main_bus #(.N_MM(N), .N_SEM(16)) dut (.clk, .rst_n, .m_req, .m_rsp, .mem_req, .mem_rsp,
    .sem_locked, .grant_seen(gs));
  sdram_model #(.LAT(LAT)) mem (.clk, .req(mem_req), .rsp(mem_rsp));
  always #5 clk = ~clk;
  always @(posedge clk) starts += $countones(gs);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int holders [16];
  initial for (int i = 0; i < 16; i++) holders[i] = -1;

  task automatic xfer(input int m, input logic we, input logic [31:0] a, input logic [31:0] d,
                      output logic [31:0] rd, output int wait_starts);
    int s0;
    @(negedge clk);
    m_req[m] = '{req: 1'b1, we: we, addr: a, wdata: d};
    s0 = starts;
    do @(posedge clk); while (!m_rsp[m].ack);
    rd = m_rsp[m].rdata;
    wait_starts = starts - s0;
    @(negedge clk);
    m_req[m] = '0;
  endtask

  for (genvar g = 0; g < N; g++) begin : g_m
    initial begin
      logic [31:0] shadow [16];
      logic [31:0] rd;
      int ws;
      m_req[g] = '0;
      for (int i = 0; i < 16; i++) shadow[i] = mem.init_word(32'(g*256 + i));
      wait (rst_n);
      for (int t = 0; t < 200; t++) begin
        int k, op; k = $urandom % 16; op = $urandom % 4;
        case (op)
          0: begin
            logic [31:0] d; d = $urandom;
            xfer(g, 1'b1, 32'(g*256 + k), d, rd, ws);
            shadow[k] = d;
          end
          1: begin   // take, check exclusion, release
            int s; s = $urandom % 2;
            xfer(g, 1'b0, 32'h8000_0000 | 32'(s), '0, rd, ws);
            if (rd[0]) begin
              checks++;
              if (holders[s] != -1 && holders[s] != g) begin failures++; $display("semaphore %0d double-taken", s); end
              holders[s] = g;
              repeat ($urandom % 5) @(posedge clk);
              holders[s] = -1;
              xfer(g, 1'b1, 32'h8000_0000 | 32'(s), 32'd0, rd, ws);
            end
          end
          default: begin
            xfer(g, 1'b0, 32'(g*256 + k), '0, rd, ws);
            checks++;
            if (rd != shadow[k]) begin failures++; $display("m%0d read %h exp %h", g, rd, shadow[k]); end
          end
        endcase
        checks++;
        if (ws > N) begin failures++; $display("m%0d waited %0d transfers", g, ws); end
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (mem.peek(32'(g*256 + i)) != shadow[i]) begin failures++; $display("m%0d word %0d not written", g, i); end
      end
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt == N);
    // idle-bus semaphore latency
    @(negedge clk);
    m_req[0] = '{req: 1'b1, we: 1'b0, addr: 32'h8000_0005, wdata: '0};
    begin
      int c; c = 0;
      do begin @(posedge clk); c++; end while (!m_rsp[0].ack);
      checks++;
      if (c != 2) begin failures++; $display("semaphore latency %0d", c); end
    end
    @(negedge clk); m_req[0] = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
