// ffl_synchronizer -- word-boundary synchronizer of the FF-LYNX receiver
// (PDT: phase detection with thresholds).
//
// One counter per bit phase counts sync sequences detected at that phase.
// Unlocked: the first counter to reach N_LOCK wins, the link locks to that
// phase and all other counters are cleared. Locked: a sync at the locked
// ("in charge") phase clears the other counters again, so stray detections
// elsewhere must accumulate between two good syncs; if a counter at another
// phase reaches N_UNLOCK the lock is dropped and all counters restart.
// word_stb is high at the locked phase, i.e. once per received word.
module ffl_synchronizer #(
  parameter int unsigned SPEED    = 8,
  parameter int unsigned N_LOCK   = 4,
  parameter int unsigned N_UNLOCK = 3,
  localparam int unsigned PW = (SPEED > 1) ? $clog2(SPEED) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] phase,
  input  logic          sync_hit,
  output logic          locked,
  output logic [PW-1:0] lock_phase,
  output logic          word_stb,
  output logic          lock_event,
  output logic          unlock_event
);

  localparam int unsigned CNTW = $clog2(((N_LOCK > N_UNLOCK) ? N_LOCK : N_UNLOCK) + 1);
  logic [CNTW-1:0] cnt [SPEED];

  assign word_stb = locked && (phase == lock_phase);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SPEED; i++) cnt[i] <= '0;
      locked       <= 1'b0;
      lock_phase   <= '0;
      lock_event   <= 1'b0;
      unlock_event <= 1'b0;
    end else begin
      lock_event   <= 1'b0;
      unlock_event <= 1'b0;
      if (sync_hit) begin
        if (!locked) begin
          if (32'(cnt[phase]) + 1 >= N_LOCK) begin
            locked     <= 1'b1;
            lock_phase <= phase;
            lock_event <= 1'b1;
            for (int i = 0; i < SPEED; i++) cnt[i] <= '0;
          end else begin
            cnt[phase] <= cnt[phase] + 1'b1;
          end
        end else if (phase == lock_phase) begin
          for (int i = 0; i < SPEED; i++) cnt[i] <= '0;
        end else if (32'(cnt[phase]) + 1 >= N_UNLOCK) begin
          locked       <= 1'b0;
          unlock_event <= 1'b1;
          for (int i = 0; i < SPEED; i++) cnt[i] <= '0;
        end else begin
          cnt[phase] <= cnt[phase] + 1'b1;
        end
      end
    end
  end

endmodule
