// tb_state_fifo -- checks the state-saving buffer against a queue model.
//
// Every cycle a random entry (no result / ALU result / pending load) is
// pushed and the buffer shifts by one; two random source registers are
// looked up and must return the youngest entry that writes them, with its
// type ID and value (r0 never matches). A pending load is completed by a fill
// carrying its register and value: the model fills the oldest pending entry,
// at a random time but always before it would leave the buffer, and the
// entry must then read back as an arrived load (the spare type ID) with the
// filled value. Lookups see a fill of the same cycle. Entries leave after
// exactly DEPTH cycles.
// The entry format and spare type code follow the description; filling the
// oldest pending load and the depth of 8 are this design's choices.
module tb_state_fifo;
  import dt_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n, shift_en, fill_valid, fill_hit;
  sentry_t push;
  ridx_t fill_rd;
  word_t fill_value;
  ridx_t  [1:0] q_reg;
  logic   [1:0] q_hit;
  skind_t [1:0] q_kind;
  word_t  [1:0] q_value;
  sentry_t model [DEPTH];   // model[0] is the youngest
  int checks = 0, failures = 0, n_fill = 0, n_done_hits = 0;

  always #5 clk = ~clk;

  state_fifo #(.DEPTH(DEPTH), .NQ(2)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int oldest;
    sentry_t m [DEPTH];
    rst_n = 0; shift_en = 0; push = '0; fill_valid = 0; fill_rd = '0; fill_value = '0; q_reg = '0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      shift_en = 1'b1;
      push.kind  = skind_t'($urandom % 3);
      push.rd    = ridx_t'($urandom % 6);
      push.value = (push.kind == SK_ALU) ? $urandom : '0;
      if (push.kind == SK_NONE) push.rd = '0;
      // fill the oldest pending load at random, and always at the last slot
      oldest = -1;
      for (int i = 0; i < DEPTH; i++) if (model[i].kind == SK_LD_PEND) oldest = i;
      fill_valid = (oldest >= 0) && (oldest == DEPTH - 1 || ($urandom % 3) == 0);
      fill_rd    = (oldest >= 0) ? model[oldest].rd : '0;
      fill_value = $urandom;
      m = model;
      if (fill_valid) begin
        m[oldest].kind  = SK_LD_DONE;
        m[oldest].value = fill_value;
        n_fill++;
      end
      q_reg[0] = ridx_t'($urandom % 6);
      q_reg[1] = ridx_t'($urandom % 6);
      #1;
      check(fill_hit == fill_valid, $sformatf("fill_hit %0d, expected %0d", fill_hit, fill_valid));
      for (int q = 0; q < 2; q++) begin
        int y;
        y = -1;
        for (int i = DEPTH - 1; i >= 0; i--)
          if (m[i].kind != SK_NONE && m[i].rd == q_reg[q] && q_reg[q] != 0) y = i;
        if (y < 0) check(!q_hit[q], $sformatf("r%0d: hit with no writer in the buffer", q_reg[q]));
        else begin
          check(q_hit[q] && q_kind[q] == m[y].kind && (m[y].kind == SK_LD_PEND || q_value[q] == m[y].value),
                $sformatf("r%0d: hit %0d kind %0d value %h, expected kind %0d value %h (slot %0d)",
                          q_reg[q], q_hit[q], q_kind[q], q_value[q], m[y].kind, m[y].value, y));
          if (m[y].kind == SK_LD_DONE) n_done_hits++;
        end
      end
      @(posedge clk);
      for (int i = DEPTH - 1; i > 0; i--) model[i] = m[i-1];
      model[0] = push;
    end
    check(n_fill > 0 && n_done_hits > 0, "fills and arrived-load lookups happened");
    $display("fills %0d arrived-load hits %0d", n_fill, n_done_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
