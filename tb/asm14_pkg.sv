// asm14_pkg: instruction encoders for the testbenches.
//
// One function per instruction of the 14-bit instruction set the core
// implements, returning the instruction word, so that test programs can be
// written as readable lists of calls. f is a 7-bit file address, d selects
// the destination (0 = W, 1 = file register), b a bit number, k a literal
// or an 11-bit jump target.
package asm14_pkg;
  localparam bit TO_W = 1'b0;
  localparam bit TO_F = 1'b1;

  function automatic logic [13:0] byteop(input logic [3:0] opc, input bit d, input int f);
    return {2'b00, opc, d, 7'(f)};
  endfunction
  function automatic logic [13:0] NOP();          return 14'h0000; endfunction
  function automatic logic [13:0] RETURN();       return 14'h0008; endfunction
  function automatic logic [13:0] RETFIE();       return 14'h0009; endfunction
  function automatic logic [13:0] SLEEP();        return 14'h0063; endfunction
  function automatic logic [13:0] CLRWDT();       return 14'h0064; endfunction
  function automatic logic [13:0] MOVWF(int f);   return byteop(4'h0, 1'b1, f); endfunction
  function automatic logic [13:0] CLRW();         return byteop(4'h1, 1'b0, 0); endfunction
  function automatic logic [13:0] CLRF(int f);    return byteop(4'h1, 1'b1, f); endfunction
  function automatic logic [13:0] SUBWF(int f, bit d);  return byteop(4'h2, d, f); endfunction
  function automatic logic [13:0] DECF(int f, bit d);   return byteop(4'h3, d, f); endfunction
  function automatic logic [13:0] IORWF(int f, bit d);  return byteop(4'h4, d, f); endfunction
  function automatic logic [13:0] ANDWF(int f, bit d);  return byteop(4'h5, d, f); endfunction
  function automatic logic [13:0] XORWF(int f, bit d);  return byteop(4'h6, d, f); endfunction
  function automatic logic [13:0] ADDWF(int f, bit d);  return byteop(4'h7, d, f); endfunction
  function automatic logic [13:0] MOVF(int f, bit d);   return byteop(4'h8, d, f); endfunction
  function automatic logic [13:0] COMF(int f, bit d);   return byteop(4'h9, d, f); endfunction
  function automatic logic [13:0] INCF(int f, bit d);   return byteop(4'hA, d, f); endfunction
  function automatic logic [13:0] DECFSZ(int f, bit d); return byteop(4'hB, d, f); endfunction
  function automatic logic [13:0] RRF(int f, bit d);    return byteop(4'hC, d, f); endfunction
  function automatic logic [13:0] RLF(int f, bit d);    return byteop(4'hD, d, f); endfunction
  function automatic logic [13:0] SWAPF(int f, bit d);  return byteop(4'hE, d, f); endfunction
  function automatic logic [13:0] INCFSZ(int f, bit d); return byteop(4'hF, d, f); endfunction
  function automatic logic [13:0] BCF(int f, int b);   return {4'b0100, 3'(b), 7'(f)}; endfunction
  function automatic logic [13:0] BSF(int f, int b);   return {4'b0101, 3'(b), 7'(f)}; endfunction
  function automatic logic [13:0] BTFSC(int f, int b); return {4'b0110, 3'(b), 7'(f)}; endfunction
  function automatic logic [13:0] BTFSS(int f, int b); return {4'b0111, 3'(b), 7'(f)}; endfunction
  function automatic logic [13:0] CALL(int k);  return {3'b100, 11'(k)}; endfunction
  function automatic logic [13:0] GOTO(int k);  return {3'b101, 11'(k)}; endfunction
  function automatic logic [13:0] MOVLW(int k); return {6'b110000, 8'(k)}; endfunction
  function automatic logic [13:0] RETLW(int k); return {6'b110100, 8'(k)}; endfunction
  function automatic logic [13:0] IORLW(int k); return {6'b111000, 8'(k)}; endfunction
  function automatic logic [13:0] ANDLW(int k); return {6'b111001, 8'(k)}; endfunction
  function automatic logic [13:0] XORLW(int k); return {6'b111010, 8'(k)}; endfunction
  function automatic logic [13:0] SUBLW(int k); return {6'b111100, 8'(k)}; endfunction
  function automatic logic [13:0] ADDLW(int k); return {6'b111110, 8'(k)}; endfunction

  // core register file addresses
  localparam int INDF = 'h00, PCL = 'h02, STATUS = 'h03, FSR = 'h04, PCLATH = 'h0A;
  localparam int C = 0, DC = 1, Z = 2, PD = 3, TO = 4, RP0 = 5, RP1 = 6, IRP = 7;
endpackage
