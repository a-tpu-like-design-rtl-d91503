// tpu_ctrl: control finite-state machine of the TPU-like accelerator.
//
// Waits for the START bit, triggers the two systolic data setup units and
// the matmul together, waits for the matmul to finish shifting out its
// result, lets the accumulator/normalize/pool/activation pipeline drain,
// and then reports completion (done_set pulse, which sets DONE). It also
// owns the accelerator-side port of BRAM A, which is read by the A data
// setup unit during the multiply and written with the finished output
// columns afterwards: column j of the result goes to address
// addr_c + j*stride_c. The two uses never overlap in time. If the matmul is
// disabled in ENABLES, a start completes at once without touching memory.
// The document describes this block as an FSM that triggers each block when
// its inputs are ready; the states and the fixed drain count are this
// design's own. States: IDLE -> MATMUL -> DRAIN -> FINISH -> IDLE.
// Timing: start pulse one clock after START is seen in IDLE; done_set a
// few clocks after the last output word, when the fixed drain count ends.
module tpu_ctrl #(
  parameter int N         = 8,
  parameter int AWIDTH    = 11,
  parameter int DWIDTH    = 8,
  parameter int PIPE_LAT  = 4     // clocks from matmul output to BRAM write
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start_tpu,
  input  logic                       enable_matmul,
  output logic                       start,       // to setup units and matmul
  input  logic                       mm_done,
  output logic                       done_set,
  output logic                       busy,
  // output address generation
  input  logic [AWIDTH-1:0]          addr_c,
  input  logic [AWIDTH-1:0]          stride_c,
  input  logic                       out_valid,
  input  logic [$clog2(N)-1:0]       out_col,
  input  logic [N-1:0][DWIDTH-1:0]   out_data,
  // read request from the A data setup unit
  input  logic                       rd_en,
  input  logic [AWIDTH-1:0]          rd_addr,
  // accelerator port of BRAM A
  output logic                       bram_en,
  output logic                       bram_we,
  output logic [AWIDTH-1:0]          bram_addr,
  output logic [N-1:0][DWIDTH-1:0]   bram_wdata
);

  typedef enum logic [1:0] {IDLE, MATMUL, DRAIN, FINISH} state_e;

  state_e        state;
  logic [3:0]    drain_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      start     <= 1'b0;
      drain_cnt <= '0;
    end else begin
      start <= 1'b0;
      unique case (state)
        IDLE: if (start_tpu) begin
          if (enable_matmul) begin
            start <= 1'b1;
            state <= MATMUL;
          end else begin
            state <= FINISH;
          end
        end
        // mm_done is cleared by the start pulse, so it is low on entry.
        MATMUL: if (mm_done && !start) begin
          drain_cnt <= 4'(PIPE_LAT);
          state     <= DRAIN;
        end
        DRAIN: begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == 4'd1) state <= FINISH;
        end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign done_set = (state == FINISH);
  assign busy     = (state != IDLE);

  // BRAM A port: output writes take priority over (never-overlapping) reads.
  always_comb begin
    bram_en    = rd_en || out_valid;
    bram_we    = out_valid;
    bram_addr  = out_valid ? AWIDTH'(addr_c + AWIDTH'(out_col) * stride_c) : rd_addr;
    bram_wdata = out_data;
  end

  a_no_conflict: assert property (@(posedge clk) disable iff (rst) !(rd_en && out_valid));

endmodule
