// read_addr_ctrl: read address controller of the direct-method 2-D
// SA-DWT.
//
// On `start` it walks the frame pass by pass (per level: rows, then
// columns), issuing one read of two words (an even/odd sample pair) per
// clock.  After the last pair of a pass it stops reading until the write
// address controller reports (`pass_written`) that every coefficient of
// that pass is back in memory, so the next pass reads finished data; this
// costs the pipeline depth once per pass.  `done` pulses when the last
// pass has been issued and written.
//
// From the published architecture: a read address controller for the
// external frame memory, two words per clock. Own choice: the scan order,
// the wait between passes and the done pulse.
module read_addr_ctrl #(
  parameter int unsigned LOG2_W = 10,
  parameter int unsigned LOG2_H = 10,
  parameter int unsigned LEVELS = 3,
  localparam int unsigned AW    = LOG2_W + LOG2_H
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          pass_written,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr0,
  output logic [AW-1:0] rd_addr1,
  output logic          rd_sol,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {IDLE, RUN, WAIT, WAIT_LAST} state_t;
  state_t state;
  logic pass_last, frame_last, sol;
  logic [1:0] level;
  logic col;

  pass_scan #(.LOG2_W(LOG2_W), .LOG2_H(LOG2_H), .LEVELS(LEVELS)) u_scan (
    .clk(clk), .rst_n(rst_n), .clear(state == IDLE), .step(rd_en),
    .addr0(rd_addr0), .addr1(rd_addr1), .sol(sol), .pass_last(pass_last),
    .frame_last(frame_last), .level(level), .col(col));

  assign rd_en  = (state == RUN);
  assign rd_sol = sol;
  assign busy   = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE:      if (start) state <= RUN;
        RUN:       if (pass_last) state <= frame_last ? WAIT_LAST : WAIT;
        WAIT:      if (pass_written) state <= RUN;
        WAIT_LAST: if (pass_written) begin state <= IDLE; done <= 1'b1; end
        default:   state <= IDLE;
      endcase
    end
  end
endmodule
