// ow_slave_model: behavioural model of a 1-Wire slave for the testbenches.
//
// Not synthesizable. KIND selects the device:
//   0  a calibration PROM (1024-bit add-only memory, 8-byte status memory):
//      0xCC skip ROM, then 0xF0 read memory / 0xAA read status (two address
//      bytes, answered with the CRC-8 of command and address, then data bytes
//      until the next reset) or 0x0F write memory / 0x55 write status (two
//      address bytes and a data byte, answered with the CRC-8 of all four,
//      then the programmed byte; the programming pulse is not modelled, the
//      byte is ANDed into the memory at once). Further data bytes program the
//      next addresses, each answered with the CRC-8 of (address, data) and the
//      read-back byte.
//   1  a board-ID device: 0x33 read ROM returns the eight ROM bytes
//      (family code, six serial bytes, CRC-8).
// Timing: a low time of at least 400 us is a reset; the model answers 30 us
// later with a 120 us presence pulse. On every other falling edge it either
// sends a bit (holding the line low 30 us for a 0) or samples the master's
// bit 30 us after the edge. US is the number of clock cycles per us.
// Memory contents: mem[i] = i*37 + 5 + SEED (mod 256), status bytes 0xFF.
module ow_slave_model #(
  parameter int         US      = 24,
  parameter int         KIND    = 0,
  parameter int         SEED    = 0,
  parameter logic [55:0] ROM_ID = 56'h0000_1234_5678_9A_01  // {serial, family}
) (
  input  logic clk,
  input  logic line,      // resolved line level
  output logic pull       // 1: the model pulls the line low
);

  byte unsigned mem  [128];
  byte unsigned stat [8];
  byte unsigned txq  [$];
  int           presences = 0;
  int           bytes_rx  = 0;

  typedef enum int {M_ROM, M_FUNC, M_ADDR, M_WDATA, M_READ, M_WRITE_NEXT, M_IDLE} mode_t;
  mode_t        mode;
  byte unsigned cmd, a_lo, a_hi, wd;
  int           n_addr;
  int unsigned  addr;

  function automatic byte unsigned crc8(input byte unsigned crc, input byte unsigned d);
    byte unsigned c;
    c = crc ^ d;
    for (int i = 0; i < 8; i++) c = c[0] ? ((c >> 1) ^ 8'h8C) : (c >> 1);
    return c;
  endfunction

  function automatic byte unsigned rd_mem(input int unsigned a, input byte unsigned c);
    if (c == 8'hAA || c == 8'h55) return stat[a % 8];
    return mem[a % 128];
  endfunction

  function automatic void on_byte(input byte unsigned b);
    byte unsigned c;
    bytes_rx++;
    case (mode)
      M_ROM: begin
        if (b == 8'hCC && KIND == 0) mode = M_FUNC;
        else if (b == 8'h33) begin
          c = 0;
          for (int i = 0; i < 7; i++) begin
            txq.push_back(ROM_ID[8*i +: 8]);
            c = crc8(c, ROM_ID[8*i +: 8]);
          end
          txq.push_back(c);
          mode = M_IDLE;
        end else mode = M_IDLE;
      end
      M_FUNC: begin
        cmd    = b;
        n_addr = 0;
        mode   = (b == 8'hF0 || b == 8'hAA || b == 8'h0F || b == 8'h55) ? M_ADDR : M_IDLE;
      end
      M_ADDR: begin
        if (n_addr == 0) a_lo = b; else a_hi = b;
        n_addr++;
        if (n_addr == 2) begin
          addr = 32'({a_hi, a_lo});
          if (cmd == 8'hF0 || cmd == 8'hAA) begin
            c = crc8(crc8(crc8(0, cmd), a_lo), a_hi);
            txq.push_back(c);
            mode = M_READ;
          end else mode = M_WDATA;
        end
      end
      M_WDATA, M_WRITE_NEXT: begin
        wd = b;
        if (mode == M_WDATA) c = crc8(crc8(crc8(crc8(0, cmd), a_lo), a_hi), wd);
        else                 c = crc8(crc8(crc8(0, addr[7:0]), addr[15:8]), wd);
        txq.push_back(c);
        if (cmd == 8'h55) stat[addr % 8] &= wd; else mem[addr % 128] &= wd;
        txq.push_back(rd_mem(addr, cmd));
        addr++;
        mode = M_WRITE_NEXT;
      end
      default: ;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) mem[i] = 8'(i * 37 + 5 + SEED);
    for (int i = 0; i < 8; i++) stat[i] = 8'hFF;
    pull = 1'b0;
    mode = M_IDLE;
  end

  // Line protocol.
  initial begin : proto
    int           t;
    bit           txbit, sending, sample;
    byte unsigned rxb, txb;
    int           rxn, txn;
    logic         prev;
    rxn = 0; txn = 0; rxb = 0; txb = 0;
    prev = 1'b1;
    forever begin
      // wait for a falling edge not caused by the model
      do begin
        prev = line;
        @(posedge clk);
      end while (!(prev && !line));
      // data to send?
      if (txn == 0 && txq.size() > 0 && (mode == M_IDLE || mode == M_READ || mode == M_WRITE_NEXT || mode == M_WDATA)) begin
        txb = txq.pop_front();
        txn = 8;
      end else if (txn == 0 && mode == M_READ) begin
        txb = rd_mem(addr, cmd);
        addr++;
        txn = 8;
      end
      sending = (txn > 0);
      txbit   = txb[0];
      if (sending && !txbit) pull = 1'b1;
      t = 0;
      sample = 1'b1;
      while (!line || t < 30 * US) begin
        @(posedge clk);
        t++;
        if (t == 30 * US) begin
          sample = line;
          pull   = 1'b0;
        end
        if (t > 30 * US && line) break;
      end
      if (t >= 400 * US) begin
        // reset: answer with a presence pulse
        txq.delete();
        txn = 0; rxn = 0;
        repeat (30 * US) @(posedge clk);
        pull = 1'b1;
        repeat (120 * US) @(posedge clk);
        pull = 1'b0;
        presences++;
        mode = M_ROM;
      end else if (sending) begin
        txb = txb >> 1;
        txn--;
      end else begin
        rxb = {sample, rxb[7:1]};
        rxn++;
        if (rxn == 8) begin
          rxn = 0;
          on_byte(rxb);
        end
      end
      prev = line;
    end
  end

endmodule
