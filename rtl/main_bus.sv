// main_bus: the single shared bus joining the media modules to the shared SDRAM.
// One transaction is in flight at a time. In IDLE the round-robin arbiter picks one
// requesting master; a request with address bit 31 set goes to the semaphore
// registers and is acknowledged in the next cycle, any other request is passed to
// the memory port and held until the memory acknowledges, and the ack (with read
// data) is routed back to the granted master. Fair round-robin arbitration and the
// semaphore registers follow the architecture; the one-word transaction and the
// address map are this design's choices.
// Timing: semaphore access 2 cycles from grant to ack; memory access 1 cycle plus the
// memory's latency.
module main_bus
  import codec_pkg::*;
#(
  parameter int unsigned N_MM  = 6,
  parameter int unsigned N_SEM = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [N_MM],
  output bus_rsp_t m_rsp [N_MM],
  // shared memory (SDRAM controller) port
  output bus_req_t mem_req,
  input  bus_rsp_t mem_rsp,
  output logic [N_SEM-1:0] sem_locked,
  output logic [N_MM-1:0]  grant_seen  // one-cycle pulse per master when its transfer starts
);
  localparam int unsigned IW = $clog2(N_MM);
  typedef enum logic [1:0] {S_IDLE, S_MEM, S_SEM} state_e;
  state_e state_q;
  logic [IW-1:0] owner_q;
  logic [N_MM-1:0] reqv, gnt;
  logic [IW-1:0] gidx;
  logic gvalid;
  logic [31:0] sem_rdata;
  bus_req_t cur;

  always_comb for (int i = 0; i < N_MM; i++) reqv[i] = m_req[i].req;

  rr_arbiter #(.N(N_MM)) u_arb (
    .clk, .rst_n, .req(reqv), .advance(state_q == S_IDLE),
    .gnt, .gnt_idx(gidx), .gnt_valid(gvalid)
  );

  assign cur = m_req[owner_q];

  hw_semaphore #(.N_SEM(N_SEM), .N_MST(N_MM)) u_sem (
    .clk, .rst_n,
    .acc(state_q == S_SEM), .we(cur.we), .idx(cur.addr[$clog2(N_SEM)-1:0]),
    .master(owner_q), .wbit(cur.wdata[0]), .rdata(sem_rdata), .locked(sem_locked)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      owner_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (gvalid) begin
          owner_q <= gidx;
          state_q <= m_req[gidx].addr[31] ? S_SEM : S_MEM;
        end
        S_MEM:  if (mem_rsp.ack) state_q <= S_IDLE;
        S_SEM:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_req     = cur;
    mem_req.req = (state_q == S_MEM);
    for (int i = 0; i < N_MM; i++) begin
      m_rsp[i].ack   = 1'b0;
      m_rsp[i].rdata = (state_q == S_SEM) ? sem_rdata : mem_rsp.rdata;
    end
    if (state_q == S_MEM) m_rsp[owner_q].ack = mem_rsp.ack;
    if (state_q == S_SEM) m_rsp[owner_q].ack = 1'b1;
    grant_seen = (state_q == S_IDLE && gvalid) ? gnt : '0;
  end

  // a master must hold its request until acknowledged
  for (genvar i = 0; i < N_MM; i++) begin : g_hold
    assert property (@(posedge clk) disable iff (!rst_n)
      (state_q != S_IDLE && owner_q == IW'(i) && !m_rsp[i].ack) |=> m_req[i].req);
  end
endmodule
