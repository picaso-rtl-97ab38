// Self-checking testbench of picaso_netnode.
//
// Builds two lines of 8 nodes: one along a row (column IDs 0..7, linked
// east to west) and one along a column (row IDs 0..7, linked south to north).
// For each hop level 0..2 it checks the decoded roles against the hopping
// pattern R/T/P of the published design's drawing, sends an independent random bit
// stream from every transmitter and checks that each receiver presents its
// transmitter's stream on NET bit 0 exactly 2^L cycles later, with NET zero
// elsewhere. It also checks the configuration write, the word shift chain
// and the parallel load.
module tb_picaso_netnode;
  import picaso_pkg::*;

  localparam int W = 16, NN = 8;

  logic clk = 0, rst_n = 0;
  logic conf_we, hop_en, net_hop, sh_en, sh_load;
  logic [NET_LVL_W-1:0] conf_lvl;
  net_axis_e axis;
  logic     [NN-1:0] tx_bit;
  logic     tx_r [NN], tx_c [NN];
  logic [W-1:0] sh_out_r [NN], sh_out_c [NN], net_r [NN], net_c [NN];
  logic [W-1:0] sh_top, load_word [NN];
  net_role_e role_r [NN], role_c [NN];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NN; i++) begin : g_n
    logic rxr, rxc;
    assign rxr = (i + 1 < NN) ? tx_r[(i + 1) % NN] : 1'b0;
    assign rxc = (i + 1 < NN) ? tx_c[(i + 1) % NN] : 1'b0;
    picaso_netnode u_r (
      .clk, .rst_n, .row_id(8'd3), .col_id(8'(i)), .conf_we, .conf_lvl, .hop_en, .axis(AXIS_ROW),
      .net_hop, .sh_en, .sh_load, .tx_bit(tx_bit[i]), .rx_e(rxr), .rx_s(1'b1), .tx(tx_r[i]),
      .sh_in(i == 0 ? sh_top : sh_out_r[(i + NN - 1) % NN]), .load_word(load_word[i]),
      .sh_out(sh_out_r[i]), .net(net_r[i]), .role(role_r[i]));
    picaso_netnode u_c (
      .clk, .rst_n, .row_id(8'(i)), .col_id(8'd5), .conf_we, .conf_lvl, .hop_en, .axis(AXIS_COL),
      .net_hop, .sh_en(1'b0), .sh_load(1'b0), .tx_bit(tx_bit[i]), .rx_e(1'b1), .rx_s(rxc),
      .tx(tx_c[i]), .sh_in('0), .load_word('0), .sh_out(sh_out_c[i]), .net(net_c[i]),
      .role(role_c[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected role strings of the drawing, node 0 first.
  function automatic string pattern(int l);
    case (l)
      0: return "RTRTRTRT";
      1: return "RPTPRPTP";
      default: return "RPPPTPPP";
    endcase
  endfunction

  function automatic byte role_chr(net_role_e r);
    return (r == NET_RX) ? "R" : (r == NET_TX) ? "T" : "P";
  endfunction

  initial begin
    conf_we = 0; hop_en = 0; net_hop = 0; sh_en = 0; sh_load = 0; conf_lvl = '0;
    axis = AXIS_ROW; tx_bit = '0; sh_top = '0;
    for (int i = 0; i < NN; i++) load_word[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int l = 0; l < 3; l++) begin
      logic [NN-1:0] hist [$];
      string pat;
      pat = pattern(l);
      hist.delete();
      conf_we = 1; conf_lvl = NET_LVL_W'(l);
      @(negedge clk);
      conf_we = 0;
      for (int i = 0; i < NN; i++) begin
        checks++;
        if (role_chr(role_r[i]) != pat[i] || role_chr(role_c[i]) != pat[i]) begin
          failures++;
          $display("FAIL level %0d node %0d role %s/%s exp %s", l, i, role_r[i].name(),
                   role_c[i].name(), pat.substr(i, i));
        end
      end
      hop_en = 1; net_hop = 1;
      for (int t = 0; t < 40; t++) begin
        tx_bit = NN'($urandom);
        hist.push_back(tx_bit);
        @(negedge clk);
        if (t + 1 >= (1 << l)) begin
          logic [NN-1:0] sent;
          sent = hist[t + 1 - (1 << l)];
          for (int i = 0; i < NN; i++) begin
            logic [W-1:0] expw;
            expw = '0;
            if (pat[i] == "R") expw[0] = sent[i + (1 << l)];
            checks++;
            if (net_r[i] !== expw || net_c[i] !== expw) begin
              failures++;
              if (failures < 10) $display("FAIL level %0d t=%0d node %0d net %h/%h exp %h", l, t, i,
                                          net_r[i], net_c[i], expw);
            end
          end
        end
      end
      hop_en = 0;
    end

    // Shift chain along the row line: words move one node per shift.
    net_hop = 0;
    for (int s = 0; s < NN; s++) begin
      sh_top = W'(16'h1000 + s);
      sh_en = 1;
      @(negedge clk);
    end
    sh_en = 0;
    for (int i = 0; i < NN; i++) begin
      checks++;
      if (net_r[i] !== W'(16'h1000 + NN - 1 - i) || sh_out_r[i] !== net_r[i]) begin
        failures++;
        $display("FAIL shift node %0d %h", i, net_r[i]);
      end
    end
    // Parallel load has priority over the shift.
    for (int i = 0; i < NN; i++) load_word[i] = W'($urandom);
    sh_load = 1; sh_en = 1;
    @(negedge clk);
    sh_load = 0; sh_en = 0;
    for (int i = 0; i < NN; i++) begin
      checks++;
      if (sh_out_r[i] !== load_word[i]) begin failures++; $display("FAIL load node %0d", i); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
