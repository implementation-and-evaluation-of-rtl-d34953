// router_env: traffic source and scoreboard for one N x N router.
//
// Source: each input offers packets of PKT phits. At every packet boundary
// it starts a new packet with probability LOAD_PCT % (otherwise it stays idle
// for one cycle), up to NPKT packets per input, to a destination drawn
// uniformly (or from a hot-spot mix when HOT_PCT > 0). Phit 0 carries the
// destination, phit 1 the source, phit 2 a sequence number, the other phits
// a checksum-like function of (source, sequence, index).
// Scoreboard: every packet that was not dropped (drop pulse in its sf cycle)
// must appear exactly once at its output, complete, with the right
// contents, and in order for every (source, destination) pair. `done` rises
// once all inputs have finished and the router has been idle for DRAIN
// cycles; the counters then hold the totals.
module router_env #(
  parameter int unsigned N        = 8,
  parameter int unsigned PHIT_W   = 8,
  parameter int unsigned PKT      = 8,
  parameter int unsigned NPKT     = 50,
  parameter int unsigned LOAD_PCT = 100,
  parameter int unsigned HOT_PCT  = 0,
  parameter int unsigned SEED     = 1,
  parameter int unsigned DRAIN    = 2000
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic [N-1:0]             sf_in,
  output logic [N-1:0][PHIT_W-1:0] data_in,
  input  logic [N-1:0]             sf_out,
  input  logic [N-1:0][PHIT_W-1:0] data_out,
  input  logic [N-1:0]             drop,
  output int                       sent,
  output int                       delivered,
  output int                       dropped,
  output int                       errors,
  output longint                   latency_sum,
  output int                       cycles,
  output logic                     done
);
  localparam int unsigned AW = $clog2(N);

  function automatic logic [PHIT_W-1:0] body(int src, int seq, int k);
    return PHIT_W'((src * 37 + seq * 11 + k * 5 + 3) ^ (k << 2));
  endfunction

  int          exp_q  [N][N][$];   // expected sequence numbers per (src, dst)
  longint      t_q    [N][N][$];   // send times
  int          seq    [N];
  int          npk    [N];
  int          ph     [N];         // phit index of the packet being sent, -1 idle
  int          cur_dst[N];
  int          tx_seq [N];
  int          rx_k   [N];
  logic [PHIT_W-1:0] rx_buf [N][PKT];
  int          idle_cnt;
  bit          src_done;

  initial begin
    void'($urandom(SEED));
  end

  always @(posedge clk) begin
    if (rst) begin
      sent = 0; delivered = 0; dropped = 0; errors = 0; latency_sum = 0;
      cycles = 0; done <= 1'b0; idle_cnt = 0;
      for (int i = 0; i < N; i++) begin
        seq[i] = 0; npk[i] = 0; ph[i] = -1; rx_k[i] = -1;
        sf_in[i] <= 1'b0; data_in[i] <= '0;
      end
    end else begin
      cycles = cycles + 1;
      // ---------------- scoreboard (outputs) ----------------
      for (int j = 0; j < N; j++) begin
        if (sf_out[j]) begin
          if (rx_k[j] >= 0) begin
            errors = errors + 1;
            $display("[%0t] env: output %0d new sf inside a packet", $time, j);
          end
          rx_k[j] = 0;
        end
        if (rx_k[j] >= 0) begin
          rx_buf[j][rx_k[j]] = data_out[j];
          rx_k[j]++;
          if (rx_k[j] == PKT) begin
            int s, q;
            bit ok;
            rx_k[j] = -1;
            s = int'(rx_buf[j][1]);
            q = int'(rx_buf[j][2]);
            ok = (int'(rx_buf[j][0][AW-1:0]) == j) && (s < N);
            for (int k = 3; k < PKT; k++)
              if (rx_buf[j][k] != body(s, q, k)) ok = 0;
            if (ok && exp_q[s][j].size() > 0 && PHIT_W'(exp_q[s][j][0]) == PHIT_W'(q)) begin
              void'(exp_q[s][j].pop_front());
              latency_sum = latency_sum + (longint'(cycles) - t_q[s][j].pop_front());
              delivered = delivered + 1;
            end else begin
              errors = errors + 1;
              $display("[%0t] env: bad packet at output %0d (src %0d seq %0d)", $time, j, s, q);
            end
          end
        end
      end
      // a packet whose sf was on the inputs in this cycle: dropped or expected
      for (int i = 0; i < N; i++) begin
        if (sf_in[i]) begin
          sent = sent + 1;
          if (drop[i]) dropped = dropped + 1;
          else begin
            exp_q[i][int'(data_in[i][AW-1:0])].push_back(tx_seq[i] % (1 << PHIT_W));
            t_q[i][int'(data_in[i][AW-1:0])].push_back(longint'(cycles));
          end
        end
      end
      // ---------------- sources (inputs) ----------------
      src_done = 1;
      for (int i = 0; i < N; i++) begin
        if (ph[i] < 0 && npk[i] < int'(NPKT)) begin
          if (($urandom % 100) < LOAD_PCT) begin
            if (HOT_PCT > 0 && ($urandom % 100) < HOT_PCT) cur_dst[i] = 0;
            else cur_dst[i] = int'($urandom % N);
            ph[i] = 0;
            tx_seq[i] = seq[i];
          end
        end
        if (ph[i] >= 0) begin
          sf_in[i] <= (ph[i] == 0);
          case (ph[i])
            0:       data_in[i] <= PHIT_W'(cur_dst[i]);
            1:       data_in[i] <= PHIT_W'(i);
            2:       data_in[i] <= PHIT_W'(tx_seq[i]);
            default: data_in[i] <= body(i, tx_seq[i] % (1 << PHIT_W), ph[i]);
          endcase
          ph[i]++;
          if (ph[i] == PKT) begin
            ph[i] = -1;
            npk[i]++;
            seq[i]++;
          end
        end else begin
          sf_in[i] <= 1'b0;
          data_in[i] <= PHIT_W'($urandom);
        end
        if (npk[i] < int'(NPKT) || ph[i] >= 0) src_done = 0;
      end
      if (src_done && sf_out == '0) idle_cnt = idle_cnt + 1;
      else idle_cnt = 0;
      if (idle_cnt >= int'(DRAIN) && !done) begin
        int left;
        left = 0;
        for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) left += exp_q[s][d].size();
        if (left != 0) begin
          errors = errors + left;
          $display("env: %0d packets never delivered", left);
        end
        done <= 1'b1;
      end
    end
  end
endmodule
