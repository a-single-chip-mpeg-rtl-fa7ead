// hw_semaphore: hardware semaphore registers for regions of the shared SDRAM.
// Media modules exchange data through the SDRAM; a semaphore register is taken by
// reading it: the read returns 1 and records the reader as owner if it was free, and
// returns 0 otherwise (test-and-set in one bus transaction, so no two modules can
// both win). Writing 0 from the owner releases it; writes from others are ignored.
// The number of registers, the read-to-take rule and the owner check are this
// design's choices; the architecture only states that semaphore registers are used.
// Timing: one access per cycle, result combinational, state updates at the edge.
module hw_semaphore #(
  parameter int unsigned N_SEM  = 16,
  parameter int unsigned N_MST  = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acc,        // access strobe
  input  logic                     we,
  input  logic [$clog2(N_SEM)-1:0] idx,
  input  logic [$clog2(N_MST)-1:0] master,
  input  logic                     wbit,       // written value (0 = release)
  output logic [31:0]              rdata,
  output logic [N_SEM-1:0]         locked
);
  logic [N_SEM-1:0]             lock_q;
  logic [$clog2(N_MST)-1:0]     owner_q [N_SEM];

  always_comb begin
    rdata = '0;
    if (acc && !we) rdata[0] = !lock_q[idx] || (owner_q[idx] == master);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q <= '0;
      for (int i = 0; i < N_SEM; i++) owner_q[i] <= '0;
    end else if (acc) begin
      if (!we) begin
        if (!lock_q[idx]) begin
          lock_q[idx]  <= 1'b1;
          owner_q[idx] <= master;
        end
      end else if (lock_q[idx] && owner_q[idx] == master && !wbit) begin
        lock_q[idx] <= 1'b0;
      end
    end
  end

  assign locked = lock_q;
endmodule
