// tb_mem_stage -- checks the memory stage: loads and stores, the write-back
// and load-feedback outputs, and store data taken from the MEM state buffer.
//
// Random EX->MEM payloads (ALU results, loads and stores on a 64-word window,
// instructions without a result) are driven one per cycle against a model
// memory. One cycle later (the stage latency) the write-back output must
// carry every register result, and the MEM->EX feedback must carry loads
// only. Some stores are marked as taking their data from the state buffer:
// the payload then carries a wrong data word and names the register of an
// earlier load still in the buffer; the memory must receive the loaded value.
// The host port checks the memory contents at the end.
// Store data from the MEM buffer follows the description; the feedback timing
// is this design's choice.
module tb_mem_stage;
  import dt_pkg::*;

  logic clk = 0, rst_n;
  exmem_t in;
  memwb_t wb, fb;
  mem_ev_t ev;
  logic [9:0] dbg_addr;
  word_t dbg_data;
  word_t mem [64];
  int checks = 0, failures = 0, n_fwd = 0, n_ld = 0;

  always #5 clk = ~clk;

  mem_stage dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int kind, last_ld_age;
    ridx_t last_ld_rd;
    word_t last_ld_val, e_val;
    bit e_valid, e_load;
    rst_n = 0; in = '0; dbg_addr = '0;
    last_ld_age = 99; last_ld_rd = '0; last_ld_val = '0;
    #12 rst_n = 1;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      in = '0; in.valid = 1; in.is_store = 1; in.result = 32'(a * 4); in.st_data = $urandom;
      mem[a] = in.st_data;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in = '0;
      in.valid = 1'($urandom % 8 != 0);
      kind = $urandom % 4;
      in.rd = ridx_t'(1 + $urandom % 15);
      in.result = $urandom;
      e_valid = 0; e_load = 0; e_val = in.result;
      case (kind)
        0: begin in.wr_rd = 1; e_valid = in.valid; end
        1: begin in.is_load = 1; in.wr_rd = 1; in.result = 32'(($urandom % 64) * 4);
                 e_valid = in.valid; e_load = in.valid; e_val = mem[in.result[7:2]]; end
        2: begin
             in.is_store = 1; in.result = 32'(($urandom % 64) * 4); in.st_data = $urandom;
             if (in.valid && last_ld_age < 4 && ($urandom % 2)) begin
               in.st_from_mem = 1; in.st_src = last_ld_rd;
               if (in.valid) mem[in.result[7:2]] = last_ld_val;
               n_fwd++;
             end else if (in.valid) mem[in.result[7:2]] = in.st_data;
           end
        default: ;
      endcase
      #1;
      check(ev.stld_fwd == (in.valid && in.st_from_mem), "store-data forward event");
      @(posedge clk); #1;
      check(wb.valid == e_valid && (!e_valid || (wb.rd == in.rd && wb.value == e_val)),
            $sformatf("write-back valid %0d rd %0d value %h, expected %0d %0d %h", wb.valid, wb.rd, wb.value, e_valid, in.rd, e_val));
      check(fb.valid == e_load && (!e_load || (fb.rd == in.rd && fb.value == e_val)),
            $sformatf("load feedback valid %0d, expected %0d", fb.valid, e_load));
      last_ld_age++;
      if (e_valid && in.rd == last_ld_rd) last_ld_age = 99;   // a younger writer hides the load
      if (e_load) begin last_ld_age = 0; last_ld_rd = in.rd; last_ld_val = e_val; n_ld++; end
    end
    @(negedge clk) in = '0;
    for (int a = 0; a < 64; a++) begin
      dbg_addr = 10'(a);
      #1;
      check(dbg_data == mem[a], $sformatf("mem[%0d] = %h, expected %h", a, dbg_data, mem[a]));
    end
    check(n_fwd > 20 && n_ld > 100, "forwarded stores and loads happened");
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
