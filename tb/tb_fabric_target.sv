// tb_fabric_target: behavioural stand-in for the GALS fabric and one AXI
// target (an SDRAM controller), for simulation only.
//
// Address commands from the NUM_INIT ingress ports are accepted one per
// cycle, the accepting port rotating every cycle, into an unbounded queue
// (the target buffer is taken as infinite). After FAB_LAT cycles a read
// command is served: the target produces one 64-bit beat per cycle,
// beat k of a burst at address A carrying data A + k, on the R channel
// of the port that sent it. Write data is always accepted; once a port
// has both a write command and a complete write burst queued, a write
// response follows FAB_LAT cycles later. Reads and writes are served in
// arrival order, one at a time, so the target is the bottleneck. The
// whole model runs on the one clock of the design.
module tb_fabric_target
  import tmac_pkg::*;
#(
  parameter int unsigned N       = 5,
  parameter int unsigned FAB_LAT = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic      [N-1:0]     ar_valid,
  output logic      [N-1:0]     ar_ready,
  input  axi_addr_t [N-1:0]     ar,
  output logic      [N-1:0]     r_valid,
  input  logic      [N-1:0]     r_ready,
  output axi_r_t    [N-1:0]     r,
  input  logic      [N-1:0]     aw_valid,
  output logic      [N-1:0]     aw_ready,
  input  axi_addr_t [N-1:0]     aw,
  input  logic      [N-1:0]     w_valid,
  output logic      [N-1:0]     w_ready,
  input  axi_w_t    [N-1:0]     w,
  output logic      [N-1:0]     b_valid,
  input  logic      [N-1:0]     b_ready,
  output axi_b_t    [N-1:0]     b
);

  typedef struct {
    int        port;
    bit        is_write;
    axi_addr_t cmd;
    int        due;
  } job_t;

  job_t   q[$];
  int     cyc = 0, rot = 0;
  int     wlast[N];
  int     awq[N];
  bit     busy = 0;
  job_t   cur;
  int     beat = 0;
  int     max_queue = 0;

  assign w_ready = '1;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q.delete();
      busy <= 0; beat <= 0; rot <= 0;
      ar_ready <= '0; aw_ready <= '0; r_valid <= '0; b_valid <= '0;
      r <= '0; b <= '0;
      for (int i = 0; i < N; i++) begin wlast[i] = 0; awq[i] = 0; end
    end else begin
      job_t j;
      bit   busy_n;
      int   beat_n;
      cyc++;
      busy_n = busy;
      beat_n = beat;
      // command acceptance
      for (int i = 0; i < N; i++) begin
        if (ar_valid[i] && ar_ready[i]) begin
          j.port = i; j.is_write = 0; j.cmd = ar[i]; j.due = cyc + FAB_LAT;
          q.push_back(j);
        end
        if (aw_valid[i] && aw_ready[i]) awq[i]++;
        if (w_valid[i] && w_ready[i] && w[i].last) wlast[i]++;
        if (awq[i] > 0 && wlast[i] > 0) begin
          awq[i]--; wlast[i]--;
          j.port = i; j.is_write = 1; j.cmd = aw[i]; j.due = cyc + FAB_LAT;
          q.push_back(j);
        end
      end
      if (q.size() > max_queue) max_queue = q.size();
      // progress of the transfer in service
      if (busy) begin
        if (!cur.is_write && r_valid[cur.port] && r_ready[cur.port]) begin
          if (beat == int'(cur.cmd.len)) busy_n = 0;
          beat_n = beat + 1;
        end
        if (cur.is_write && b_valid[cur.port] && b_ready[cur.port]) busy_n = 0;
      end
      if (!busy_n && q.size() != 0 && q[0].due <= cyc) begin
        cur = q.pop_front();
        busy_n = 1;
        beat_n = 0;
      end
      busy <= busy_n;
      beat <= beat_n;
      r_valid <= '0;
      b_valid <= '0;
      if (busy_n && !cur.is_write) begin
        r_valid[cur.port]     <= 1'b1;
        r[cur.port].id        <= cur.cmd.id;
        r[cur.port].data      <= 64'(cur.cmd.addr) + 64'(beat_n);
        r[cur.port].resp      <= 2'b00;
        r[cur.port].last      <= (beat_n == int'(cur.cmd.len));
      end
      if (busy_n && cur.is_write) begin
        b_valid[cur.port] <= 1'b1;
        b[cur.port].id    <= cur.cmd.id;
        b[cur.port].resp  <= 2'b00;
      end
      // rotating command acceptance
      rot <= (rot + 1) % N;
      ar_ready <= N'(1) << ((rot + 1) % N);
      aw_ready <= N'(1) << ((rot + 1) % N);
    end
  end

endmodule
