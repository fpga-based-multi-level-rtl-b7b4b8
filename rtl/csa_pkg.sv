// csa_pkg -- compile-time helpers shared by the carry-save compressor trees.
//
// The linear-array compressor trees feed their regular (non-carry) inputs
// from a first-in first-out list of words: first the input operands that
// are not used as carry inputs, then the partial sum words in the order the
// adders produce them ("first created partial sums are added first").  The
// functions below replay that list at elaboration time and tell each adder
// slot which list entry it reads, or that it reads zero because the list has
// run dry (this only happens in the 5:3 tree).  All functions are constant
// functions: they are only called with parameters as arguments.
//
// List entry numbering, for a tree with NOP operands and NREG regular slots
// per adder after FIRST operands enter the first adder through its carry
// inputs:
//   entry e <  NOP-FIRST : input operand I[FIRST+e]
//   entry e >= NOP-FIRST : partial sum word of adder (e - (NOP-FIRST))
package csa_pkg;

  // Number of 3:2 carry-save adders in a binary linear array (each removes
  // one word): Nop - 2.
  function automatic int lin32_adders(input int nop);
    return nop - 2;
  endfunction

  // Number of 5:3 compressor arrays in a ternary linear array:
  // ceil((Nop - 1) / 2).
  function automatic int lin53_adders(input int nop);
    return nop / 2;  // equals ceil((nop-1)/2) for integers
  endfunction

  // Source list entry of regular slot `slot` (0 .. nreg-1) of adder `k`, or
  // -1 for a constant zero.  `first` operands enter adder 0 through its
  // carry inputs, so the list starts with L0 = nop-first operands, and adder
  // kk has pushed its sum word before adder kk+1 reads.  Adder k sees
  // L0 + k entries in all.  Until the list runs dry every adder takes nreg
  // entries.  From then on every adder takes just the one entry its
  // predecessor pushed.  So the entries taken before adder k number
  //   c(k) = min(nreg*k, L0 + k - 1)   (c(0) = 0),
  // and slot s reads entry c(k)+s if that entry already exists.
  function automatic int slot_src(input int nop, input int first,
                                  input int nreg, input int k,
                                  input int slot);
    int l0;
    int c;
    l0 = nop - first;
    c  = (k == 0) ? 0 : ((nreg * k < l0 + k - 1) ? nreg * k : l0 + k - 1);
    return (c + slot < l0 + k) ? c + slot : -1;
  endfunction

  // Number of regular slots of adder k that read a real word (not zero).
  function automatic int slots_used(input int nop, input int first,
                                    input int nreg, input int k);
    int n;
    n = 0;
    for (int s = 0; s < nreg; s++)
      if (slot_src(nop, first, nreg, k, s) >= 0) n++;
    return n;
  endfunction

  // Block size of a pipelined tree: X = 2 * ceil((Nop/2)^(1/S)), the
  // smallest even X whose S-fold reduction by X/2 covers Nop operands.
  function automatic int pipe_block_size(input int nop, input int stages);
    int r;
    int p;
    r = 1;
    forever begin
      p = 1;
      for (int i = 0; i < stages; i++) p = p * r;
      if (2 * p >= nop) break;
      r++;
    end
    return (2 * r < 3) ? 3 : 2 * r;
  endfunction

  // Words left after stage `s` (s = 0 means the input) of a pipelined tree
  // whose stages reduce every group of up to x words to two words.
  function automatic int pipe_words(input int nop, input int x, input int s);
    int w;
    w = nop;
    for (int i = 0; i < s; i++)
      if (w > 2) w = 2 * ((w + x - 1) / x);
    return w;
  endfunction

  // Number of register stages of a pipelined tree (stages until two words).
  function automatic int pipe_stages(input int nop, input int x);
    int w;
    int s;
    w = nop;
    s = 0;
    while (w > 2) begin
      w = 2 * ((w + x - 1) / x);
      s++;
    end
    return s;
  endfunction

endpackage
