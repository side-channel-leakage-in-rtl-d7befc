// stimulus_ctrl: enumerates the stimuli of a side-channel measurement run.
//
// After `start` it walks the masked input a_m from 0 to 255 (outer loop) and,
// for each, the mask m from 0 to 255 (inner loop), presenting every pair
// REPEAT times in a row so that repeated power traces of one pair can be
// averaged while the fresh mask changes underneath.  One stimulus is issued
// per cycle (`valid`) unless `pause` is high, which holds everything.
// `new_pair` marks the first repetition of a pair; `done` pulses for one
// cycle after the last stimulus; `busy` is high from start to done.
// The enumeration (all m for all a_m, 64K pairs, 1024-fold averaging) follows
// the document, where a small embedded processor runs it as a program; doing
// it with counters, and the handshake, are this design's choices.
module stimulus_ctrl #(
  parameter int unsigned REPEAT = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       pause,
  output logic       busy,
  output logic       valid,
  output logic       new_pair,
  output logic [7:0] a_m,
  output logic [7:0] m,
  output logic       done
);
  localparam int unsigned RW = (REPEAT > 1) ? $clog2(REPEAT) : 1;

  logic [RW-1:0] rep;
  logic          last_rep, last_pair;

  always_comb begin
    last_rep  = (rep == RW'(REPEAT - 1));
    last_pair = (a_m == 8'hff) && (m == 8'hff);
    valid     = busy && !pause;
    new_pair  = valid && (rep == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rep  <= '0;
      a_m  <= '0;
      m    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          rep  <= '0;
          a_m  <= '0;
          m    <= '0;
        end
      end else if (valid) begin
        if (!last_rep) begin
          rep <= rep + 1'b1;
        end else begin
          rep <= '0;
          m   <= m + 8'd1;
          if (m == 8'hff) a_m <= a_m + 8'd1;
          if (last_pair) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  initial assert (REPEAT >= 1) else $error("stimulus_ctrl: REPEAT must be at least 1");
endmodule
