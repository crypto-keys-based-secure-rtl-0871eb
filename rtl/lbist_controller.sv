// lbist_controller: sequencer of the Logic BIST run.
//
// Runs in the system clock domain. A rising edge on start (a synchronised
// level) begins a run:
//   LOAD    one cycle: the pattern generator takes its seed, the MISR clears
//   SHIFT   CHAIN_LEN cycles with scan_en high: the chain fills from the
//           generator and the previous response shifts out into the MISR
//           (not for the first pattern, whose unload is the core's old state)
//   CAPTURE one cycle with scan_en low: the core captures its response to the
//           generator-driven inputs, the primary outputs go to the MISR
//   ...     SHIFT/CAPTURE repeat for N_PATTERNS patterns
//   UNLOAD  CHAIN_LEN cycles shifting out the last response
//   DONE    done held high until start falls
// A run therefore takes 1 + N_PATTERNS*(CHAIN_LEN+1) + CHAIN_LEN cycles from
// LOAD to DONE. The source names Logic BIST and its seeded LFSRs but gives no
// sequencing; pattern count and scheme are this design's own.
module lbist_controller #(
  parameter int unsigned N_PATTERNS = 256,
  parameter int unsigned CHAIN_LEN  = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic prpg_load,
  output logic prpg_en,
  output logic scan_en,
  output logic misr_clear,
  output logic misr_en,
  output logic busy,
  output logic done
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SHIFT, S_CAPTURE, S_UNLOAD, S_DONE} st_t;

  localparam int unsigned PW = $clog2(N_PATTERNS + 1);
  localparam int unsigned CW = $clog2(CHAIN_LEN + 1);

  st_t           st;
  logic [PW-1:0] pat;
  logic [CW-1:0] cnt;
  logic          start_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      pat     <= '0;
      cnt     <= '0;
      start_d <= 1'b0;
    end else begin
      start_d <= start;
      unique case (st)
        S_IDLE:    if (start && !start_d) st <= S_LOAD;
        S_LOAD: begin
          st  <= S_SHIFT;
          pat <= '0;
          cnt <= '0;
        end
        S_SHIFT: begin
          if (cnt == CW'(CHAIN_LEN - 1)) begin
            st  <= S_CAPTURE;
            cnt <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_CAPTURE: begin
          pat <= pat + 1'b1;
          st  <= (pat == PW'(N_PATTERNS - 1)) ? S_UNLOAD : S_SHIFT;
        end
        S_UNLOAD: begin
          if (cnt == CW'(CHAIN_LEN - 1)) begin
            st  <= S_DONE;
            cnt <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_DONE:    if (!start) st <= S_IDLE;
        default:   st <= S_IDLE;
      endcase
    end
  end

  assign prpg_load  = (st == S_LOAD);
  assign misr_clear = (st == S_LOAD);
  assign prpg_en    = (st == S_SHIFT) || (st == S_CAPTURE);
  assign scan_en    = (st == S_SHIFT) || (st == S_UNLOAD);
  assign misr_en    = (st == S_SHIFT && pat != '0) || (st == S_CAPTURE) || (st == S_UNLOAD);
  assign busy       = (st != S_IDLE) && (st != S_DONE);
  assign done       = (st == S_DONE);

  // the chain never shifts and captures in the same cycle; load only from idle
  a_shift_xor_capture : assert property (@(posedge clk) disable iff (!rst_n)
    !(scan_en && st == S_CAPTURE));
  a_load_from_idle : assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_LOAD) |-> $past(st) == S_IDLE);

endmodule
