// Testbench for sram_ctrl with a behavioural SRAM. Both ports issue random
// requests (port B mixes reads and writes) for 20000 cycles. Checked: port A
// is granted whenever it asks, port B only when A is idle, and every read
// returns, exactly two cycles after its grant, the value a reference memory
// holds for that address.
module tb_sram_ctrl;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic a_req, a_gnt, a_rvalid, b_req, b_we, b_gnt, b_rvalid;
  logic [AW-1:0] a_addr, b_addr, sram_addr;
  logic [31:0] a_rdata, b_wdata, b_rdata, sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  int checks = 0, failures = 0, b_stalls = 0;

  sram_ctrl #(.AW(AW)) dut (.*);
  sram_model #(.AW(AW)) u_mem (.clk, .addr(sram_addr), .dq_o(sram_dq_o), .dq_i(sram_dq_i),
                               .dq_oe(sram_dq_oe), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] ref_mem [2**AW];
  // expected read data, indexed by the cycle it is due in
  logic [31:0] exp_a [4], exp_b [4];
  logic        due_a [4], due_b [4];
  int cyc = 0;

  initial for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
  initial for (int i = 0; i < 4; i++) begin due_a[i] = 0; due_b[i] = 0; end

  always @(posedge clk) if (rst_n) begin
    // responses due in this cycle (sampled before the edge updates them)
    chk(a_rvalid == due_a[cyc % 4], "a_rvalid timing");
    chk(b_rvalid == due_b[cyc % 4], "b_rvalid timing");
    if (due_a[cyc % 4]) chk(a_rdata == exp_a[cyc % 4], "a_rdata");
    if (due_b[cyc % 4]) chk(b_rdata == exp_b[cyc % 4], "b_rdata");
    due_a[cyc % 4] = 0;
    due_b[cyc % 4] = 0;
    // grant rules
    chk(a_gnt == a_req, "a always granted");
    chk(b_gnt == (b_req && !a_req), "b granted only when a idle");
    if (b_req && !b_gnt) b_stalls++;
    // record what this cycle's grant will return
    if (a_gnt) begin
      due_a[(cyc + 2) % 4] = 1;
      exp_a[(cyc + 2) % 4] = ref_mem[a_addr];
    end else if (b_gnt) begin
      if (b_we) ref_mem[b_addr] = b_wdata;
      else begin
        due_b[(cyc + 2) % 4] = 1;
        exp_b[(cyc + 2) % 4] = ref_mem[b_addr];
      end
    end
    cyc++;
    // new stimulus (B holds its request until granted)
    a_req  <= ($urandom % 4) == 0;
    a_addr <= AW'($urandom);
    if (!b_req || b_gnt) begin
      b_req   <= ($urandom % 3) != 0;
      b_we    <= ($urandom % 2) == 0;
      b_addr  <= AW'($urandom % 64);
      b_wdata <= $urandom;
    end
  end

  initial begin
    a_req = 0; b_req = 0; b_we = 0; a_addr = '0; b_addr = '0; b_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20000) @(posedge clk);
    chk(b_stalls > 100, "port B was held off by the display port");
    $display("port B stalls: %0d", b_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
