// Synchronization module between the main pipeline and the command
// pipeline ("Lock").
//
// Each pipeline has a lock register. Decoding synch_p (with a 5-bit id in
// its rd field) in a pipeline sets that pipeline's lock, which stalls it.
// Once both pipelines have issued synch_p with the same id, both locks are
// released: the pipeline that arrives second clears the other's lock and is
// not locked itself. A machine-mode flag, set when an interrupt is about to
// be taken (pending_irq_i) and cleared when the handler returns (irq_done_i),
// masks the main pipeline's lock so the core can serve interrupts while it
// waits. Locks, ids and the flag are the design's; own choices: synch_p ids
// that differ never release each other (the first lock stays), both pipelines
// issuing the same id in the same cycle lock neither, and the lock outputs
// come straight from the registers (a lock takes effect the cycle after
// synch_p is decoded).
module sync_lock (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       cmd_lock_issued_i,
  input  logic [4:0] cmd_lock_id_i,
  input  logic       main_lock_issued_i,
  input  logic [4:0] main_lock_id_i,
  input  logic       pending_irq_i,
  input  logic       irq_done_i,
  output logic       cmd_pipe_lock_o,
  output logic       main_pipe_lock_o
);
  logic       cmd_q, main_q, mmode_q;
  logic [4:0] cmd_id_q, main_id_q;
  logic       cmd_meets_main, main_meets_cmd, both_now;

  assign both_now       = cmd_lock_issued_i && main_lock_issued_i && (cmd_lock_id_i == main_lock_id_i);
  assign cmd_meets_main = cmd_lock_issued_i && main_q && (main_id_q == cmd_lock_id_i);
  assign main_meets_cmd = main_lock_issued_i && cmd_q && (cmd_id_q == main_lock_id_i);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cmd_q     <= 1'b0;
      main_q    <= 1'b0;
      cmd_id_q  <= '0;
      main_id_q <= '0;
      mmode_q   <= 1'b0;
    end else begin
      // command pipeline lock
      if (main_meets_cmd) cmd_q <= 1'b0;
      else if (cmd_lock_issued_i && !cmd_meets_main && !both_now) begin
        cmd_q    <= 1'b1;
        cmd_id_q <= cmd_lock_id_i;
      end
      // main pipeline lock
      if (cmd_meets_main) main_q <= 1'b0;
      else if (main_lock_issued_i && !main_meets_cmd && !both_now) begin
        main_q    <= 1'b1;
        main_id_q <= main_lock_id_i;
      end
      // machine-mode flag
      if (pending_irq_i)   mmode_q <= 1'b1;
      else if (irq_done_i) mmode_q <= 1'b0;
    end
  end

  assign cmd_pipe_lock_o  = cmd_q;
  assign main_pipe_lock_o = main_q && !mmode_q;
endmodule
