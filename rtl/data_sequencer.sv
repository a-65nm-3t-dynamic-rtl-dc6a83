// Data sequencer of the ASIC core.
//
// After start it writes the weights into all four macros: 64 reads of the
// weight SRAM (one row of every macro per word), each written into the
// array one cycle later, one row per cycle as the DARAM allows. It then
// runs n_groups accumulations of n_cycles MAC cycles each: every cycle it
// reads one input vector from the activation SRAM (consecutive addresses
// from abase) and hands a tag (valid, last, high-nibble, cycles done) to the
// next pipeline stage, where the vector reaches the macros.
//
// Two events change the flow. If the post-processing reports that every
// output of the running accumulation has been terminated by the ReLU check,
// the remaining cycles are dropped: a single flush slot (last set, no MAC)
// closes the accumulation and the read address jumps to the next group.
// When REFRESH_INTERVAL cycles have passed since the weights were written,
// the 64-cycle weight write is repeated between two accumulations before the
// stored voltages drift too far. The 64-cycle write and the refresh follow
// the published design; refreshing only between accumulations and the
// start/busy/done handshake are this design's choices.
//
// Timing: SRAM reads take one cycle; s1_* and the macro write signals are
// aligned with the read data. done pulses once the last result has left
// post-processing.
module data_sequencer
  import cim_pkg::CNT_W;
#(
  parameter int ROWS             = cim_pkg::ROWS,
  parameter int WADDR_W          = 10,
  parameter int AADDR_W          = 10,
  parameter int REFRESH_INTERVAL = 5500
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    mode8,
  input  logic [WADDR_W-1:0]      wbase,
  input  logic [AADDR_W-1:0]      abase,
  input  logic [CNT_W-1:0]        n_cycles,
  input  logic [CNT_W-1:0]        n_groups,
  input  logic                    all_term,
  input  logic                    out_valid,
  output logic                    busy,
  output logic                    done,
  // weight SRAM read and macro write
  output logic                    w_en,
  output logic [WADDR_W-1:0]      w_addr,
  output logic                    m_we,
  output logic [$clog2(ROWS)-1:0] m_wrow,
  // activation SRAM read and stage-1 tag
  output logic                    a_en,
  output logic [AADDR_W-1:0]      a_addr,
  output logic                    s1_valid,
  output logic                    s1_mac,
  output logic                    s1_last,
  output logic                    s1_hi,
  output logic [CNT_W-1:0]        s1_t,
  // statistics
  output logic [15:0]             n_refresh,
  output logic [15:0]             n_flush
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RUN, S_REFRESH, S_DRAIN} state_e;
  state_e state;

  logic [$clog2(ROWS)-1:0] row;
  logic [CNT_W-1:0]        t, g;
  logic [31:0]             age;       // cycles since the last weight write
  logic                    refresh_due;
  logic                    flush;
  logic                    issue;
  logic                    grp_end;

  assign refresh_due = age >= 32'(REFRESH_INTERVAL);
  assign flush       = (state == S_RUN) && all_term && (t != '0);
  assign issue       = (state == S_RUN);
  assign grp_end     = issue && (flush || t == n_cycles - 1'b1);

  always_comb begin
    w_en   = (state == S_LOAD) || (state == S_REFRESH);
    w_addr = wbase + WADDR_W'(row);
    a_en   = issue && !flush;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      row       <= '0;
      t         <= '0;
      g         <= '0;
      age       <= '0;
      a_addr    <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      m_we      <= 1'b0;
      m_wrow    <= '0;
      s1_valid  <= 1'b0;
      s1_mac    <= 1'b0;
      s1_last   <= 1'b0;
      s1_hi     <= 1'b0;
      s1_t      <= '0;
      n_refresh <= '0;
      n_flush   <= '0;
    end else begin
      done     <= 1'b0;
      m_we     <= w_en;
      m_wrow   <= row;
      s1_valid <= issue;
      s1_mac   <= issue && !flush;
      s1_last  <= grp_end;
      s1_hi    <= mode8 && !t[0];
      s1_t     <= t;
      if (w_en) age <= '0;
      else if (age != '1) age <= age + 1;

      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD;
          busy   <= 1'b1;
          row    <= '0;
          t      <= '0;
          g      <= '0;
          a_addr <= abase;
        end
        S_LOAD, S_REFRESH: begin
          row <= row + 1'b1;
          if (row == $clog2(ROWS)'(ROWS - 1)) begin
            if (state == S_REFRESH) n_refresh <= n_refresh + 1'b1;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (flush) n_flush <= n_flush + 1'b1;
          if (grp_end) begin
            a_addr <= a_addr + AADDR_W'(n_cycles - t);
            t      <= '0;
            g      <= g + 1'b1;
            if (g == n_groups - 1'b1) state <= S_DRAIN;
            else if (refresh_due) begin
              state <= S_REFRESH;
              row   <= '0;
            end
          end else begin
            a_addr <= a_addr + 1'b1;
            t      <= t + 1'b1;
          end
        end
        S_DRAIN: if (out_valid && !s1_valid) begin
          state <= S_IDLE;
          busy  <= 1'b0;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
