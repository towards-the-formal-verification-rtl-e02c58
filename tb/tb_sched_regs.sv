// Test of the configuration registers: reset values, random writes to u,
// ns and every slot field, writes to addresses outside the map (which must
// change nothing), and read-out of every slot through sigma, all compared
// with a model.
`timescale 1ns/1ps
module tb_sched_regs;
  import fr_pkg::*;
  localparam int NS = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] addr = 0;
  logic [31:0] wdata = 0;
  logic [3:0] sigma = 0;
  logic [7:0] cfg_u;
  logic [4:0] cfg_ns;
  slot_cfg_t slot, model [NS];
  logic [7:0] m_u = 0;
  logic [4:0] m_ns = 0;
  int checks = 0, failures = 0;
  int kind;

  sched_regs #(.NS_MAX(NS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic compare_all();
    chk(cfg_u == m_u && cfg_ns == m_ns, "u and ns");
    for (int s = 0; s < NS; s++) begin
      sigma = 4'(s);
      #1;
      chk(slot == model[s], $sformatf("slot %0d", s));
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) model[s] = '0;
    #12;
    compare_all();
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      we = 1;
      kind = $urandom % 8;
      unique case (kind)
        0: addr = A_U;
        1: addr = A_NS;
        2: addr = {A_ECU, 5'($urandom)};
        3: addr = {A_ST, 5'($urandom)};
        4: addr = {A_MLEN, 5'($urandom)};
        5: addr = {A_WAKEUP, 5'($urandom)};
        6: addr = {3'($urandom_range(6, 7)), 5'($urandom)};
        default: addr = 8'($urandom);
      endcase
      wdata = $urandom;
      @(posedge clk);
      if (addr == A_U) m_u = wdata[7:0];
      if (addr == A_NS) m_ns = wdata[4:0];
      if (addr[4:0] < NS) begin
        case (addr[7:5])
          A_ECU:    model[addr[3:0]].ecu    = wdata[7:0];
          A_ST:     model[addr[3:0]].st     = wdata[15:0];
          A_MLEN:   model[addr[3:0]].mlen   = wdata[15:0];
          A_WAKEUP: model[addr[3:0]].wakeup = wdata[15:0];
          default: ;
        endcase
      end
      if ($urandom % 50 == 0) begin
        @(negedge clk);
        we = 0;
        compare_all();
      end
    end
    @(negedge clk);
    we = 0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
